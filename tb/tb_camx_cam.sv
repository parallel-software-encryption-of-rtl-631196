// tb_camx_cam: self-checking test of one CAM module (camx_cam).
// A shadow array in the testbench follows every write. The test fills the
// array through the 32-bit word port, reads words back, reads bit columns at
// random positions, writes bit columns under random per-entry masks, and runs
// masked searches whose keys are taken from a random entry with random
// don't-care bits (so matches occur), including the all-zero mask that must
// match every entry.
module tb_camx_cam;
  localparam int N  = 32;
  localparam int X  = 256;
  localparam int PW = $clog2(X);
  localparam int EW = $clog2(N);
  localparam int WW = $clog2(X / 32);

  logic          clk = 0;
  logic [PW-1:0] col_raddr = '0, col_waddr = '0;
  logic [N-1:0]  col_rdata, col_wdata = '0, col_wmask = '0, match;
  logic          col_we = 0, srch_en = 0, w_en = 0, w_we = 0;
  logic [X-1:0]  srch_key = '0, srch_mask = '0;
  logic [EW-1:0] w_entry = '0;
  logic [WW-1:0] w_word = '0;
  logic [31:0]   w_wdata = '0, w_rdata;

  camx_cam #(.N(N), .X(X)) dut (.*);

  always #5 clk = ~clk;

  logic [X-1:0] shadow [N];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [X-1:0] rand_word();
    logic [X-1:0] v;
    for (int j = 0; j < X / 32; j++) v[32*j +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nmatch_total;
    @(negedge clk);
    // fill through the word port
    for (int k = 0; k < N; k++) begin
      shadow[k] = rand_word();
      for (int j = 0; j < X / 32; j++) begin
        w_en = 1; w_we = 1; w_entry = EW'(k); w_word = WW'(j);
        w_wdata = shadow[k][32*j +: 32];
        @(negedge clk);
      end
    end
    w_en = 0;
    // word reads
    for (int t = 0; t < 64; t++) begin
      int k, j;
      k = $urandom_range(N - 1); j = $urandom_range(X / 32 - 1);
      w_en = 1; w_we = 0; w_entry = EW'(k); w_word = WW'(j);
      @(negedge clk);
      w_en = 0;
      check(w_rdata == shadow[k][32*j +: 32], $sformatf("word read e%0d w%0d", k, j));
    end
    // column reads
    for (int t = 0; t < 64; t++) begin
      int p;
      p = $urandom_range(X - 1);
      col_raddr = PW'(p);
      #1;
      for (int k = 0; k < N; k++)
        check(col_rdata[k] == shadow[k][p], $sformatf("col read p%0d e%0d", p, k));
      @(negedge clk);
    end
    // column writes with per-entry mask
    for (int t = 0; t < 64; t++) begin
      int p;
      p = $urandom_range(X - 1);
      col_we = 1; col_waddr = PW'(p); col_wdata = N'($urandom); col_wmask = N'($urandom);
      for (int k = 0; k < N; k++) if (col_wmask[k]) shadow[k][p] = col_wdata[k];
      @(negedge clk);
      col_we = 0;
      col_raddr = PW'(p);
      #1;
      for (int k = 0; k < N; k++)
        check(col_rdata[k] == shadow[k][p], $sformatf("col write p%0d e%0d", p, k));
    end
    // make a few entries share a field so searches hit several of them
    for (int k = 0; k < N; k += 3) begin
      shadow[k][15:0] = 16'hA5C3;
      w_en = 1; w_we = 1; w_entry = EW'(k); w_word = '0; w_wdata = shadow[k][31:0];
      @(negedge clk);
    end
    w_en = 0;
    // masked searches
    nmatch_total = 0;
    for (int t = 0; t < 40; t++) begin
      logic [X-1:0] key, msk;
      key = shadow[$urandom_range(N - 1)];
      if (t == 0)      msk = '0;
      else if (t < 10) msk = X'(16'hFFFF);
      else             msk = rand_word() & rand_word() & rand_word();
      srch_en = 1; srch_key = key ^ (rand_word() & ~msk); srch_mask = msk;
      @(negedge clk);
      srch_en = 0;
      for (int k = 0; k < N; k++) begin
        bit exp;
        exp = (((shadow[k] ^ key) & msk) == '0);
        nmatch_total += int'(exp);
        check(match[k] == exp, $sformatf("search t%0d e%0d", t, k));
      end
      if (t == 0) check(match == '1, "all-zero mask matches all");
    end
    check(nmatch_total > N + 40, "searches produced matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
