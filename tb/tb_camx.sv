// tb_camx: end-to-end test of the CAMX core at a reduced size (16 entries,
// full 256-bit width). Part 1 drives random instructions through the system
// bus and compares the whole contents of both CAM modules with a reference
// model of the instruction set after every instruction: XOR, AND, OR, ADD,
// COPY, CAMX_ALL_WRITE and CAMX_MASK_SEARCH, with searches leaving a random
// subset of entries active, bus stalls while busy, and the W+2 cycle latency
// of bit-serial instructions. Part 2 hands the bus to the host CPU model,
// which encrypts 16 AES-128 blocks in parallel and checks them. Each
// mechanism is counted and a failure is counted for any that never occurred.
module tb_camx;
  import camx_pkg::*;
  localparam int N  = 16;
  localparam int X  = 256;
  localparam int WW = $clog2(X / 32);

  logic clk = 0, rst_n = 0;
  logic bus_req, bus_we, bus_ready, bus_rvalid, busy, done;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;

  // testbench bus master and host CPU model share the bus
  logic t_req = 0, t_we = 0;
  logic [31:0] t_addr = '0, t_wdata = '0;
  logic h_req, h_we;
  logic [31:0] h_addr, h_wdata;
  logic host_sel = 0, host_start = 0, host_finished;
  int h_checks, h_failures, n_search, n_allwrite, n_xor, n_copy, n_stall;
  longint cyc_sub, cyc_mix, cyc_ark, cyc_other, cyc_total;

  assign bus_req   = host_sel ? h_req   : t_req;
  assign bus_we    = host_sel ? h_we    : t_we;
  assign bus_addr  = host_sel ? h_addr  : t_addr;
  assign bus_wdata = host_sel ? h_wdata : t_wdata;

  camx #(.N(N), .X(X)) dut (.*);

  camx_host_cpu #(.NE(N), .X(X)) host (
    .clk, .start(host_start),
    .bus_req(h_req), .bus_we(h_we), .bus_addr(h_addr), .bus_wdata(h_wdata),
    .bus_ready, .bus_rdata, .bus_rvalid,
    .finished(host_finished), .checks(h_checks), .failures(h_failures),
    .cyc_sub, .cyc_mix, .cyc_ark, .cyc_other, .cyc_total,
    .n_search, .n_allwrite, .n_xor, .n_copy, .n_stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end

  // ---------------- bus master of part 1
  int stalls = 0;
  task automatic xfer(bit we, logic [31:0] addr, logic [31:0] wdata,
                      output logic [31:0] rdata);
    t_req = 1; t_we = we; t_addr = addr; t_wdata = wdata;
    #1;
    while (!bus_ready) begin stalls++; @(negedge clk); end
    @(negedge clk);
    t_req = 0;
    rdata = bus_rdata;
  endtask

  function automatic logic [31:0] cam_addr(wing_e w, int entry, int word);
    return 32'h8000_0000 | (32'(w) << 30) | 32'(entry << (2 + WW)) | 32'(word << 2);
  endfunction

  // ---------------- reference model of the instruction set
  logic [X-1:0] ml [N], mr [N];
  logic [X-1:0] rsearch = '0, rmask = '0;
  bit vld [N];

  task automatic model(instr_t in);
    int w;
    w = int'(in.c) + 1;
    if (in.b == CAMX_MASK_SEARCH) begin
      for (int k = 0; k < N; k++)
        vld[k] = ((((in.a == LEFT_WING) ? ml[k] : mr[k]) ^ rsearch) & rmask) == '0;
      return;
    end
    for (int k = 0; k < N; k++) begin
      bit cy;
      logic [X-1:0] l0, r0;
      if (!vld[k]) continue;
      cy = 0;
      l0 = ml[k]; r0 = mr[k];
      for (int i = 0; i < w; i++) begin
        int pl, pr, pd;
        bit a, b, res;
        pl = (int'(in.d) + i) % X; pr = (int'(in.e) + i) % X;
        // bits already rewritten earlier in this instruction are read back
        a = (in.a == LEFT_WING) ? ml[k][pl] : l0[pl];
        b = (in.a == RIGHT_WING) ? mr[k][pr] : r0[pr];
        case (in.b)
          CAMX_DATA_XOR:  res = a ^ b;
          CAMX_DATA_AND:  res = a & b;
          CAMX_DATA_OR:   res = a | b;
          CAMX_DATA_ADD:  begin res = a ^ b ^ cy; cy = (a & b) | (cy & (a ^ b)); end
          CAMX_DATA_COPY: res = (in.a == LEFT_WING) ? b : a;
          default:        res = (i < 8) ? in.d[i] : 1'b0;   // ALL_WRITE
        endcase
        if (in.b == CAMX_ALL_WRITE) pd = pr; else pd = (in.a == LEFT_WING) ? pl : pr;
        if (in.a == LEFT_WING) ml[k][pd] = res; else mr[k][pd] = res;
      end
    end
  endtask

  task automatic compare_all(string what);
    for (int k = 0; k < N; k++)
      for (int j = 0; j < X / 32; j++) begin
        logic [31:0] d;
        xfer(1'b0, cam_addr(LEFT_WING, k, j), '0, d);
        check(d == ml[k][32*j +: 32], $sformatf("%s: left e%0d w%0d", what, k, j));
        xfer(1'b0, cam_addr(RIGHT_WING, k, j), '0, d);
        check(d == mr[k][32*j +: 32], $sformatf("%s: right e%0d w%0d", what, k, j));
      end
  endtask

  int cnt_op [16];
  int cnt_partial = 0, cnt_carry = 0, cnt_latency = 0;

  initial begin
    logic [31:0] d;
    op_e ops[7] = '{CAMX_DATA_XOR, CAMX_DATA_AND, CAMX_DATA_OR, CAMX_DATA_ADD,
                    CAMX_DATA_COPY, CAMX_ALL_WRITE, CAMX_MASK_SEARCH};
    foreach (cnt_op[i]) cnt_op[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      vld[k] = 1;
      for (int j = 0; j < X / 32; j++) begin
        ml[k][32*j +: 32] = $urandom; mr[k][32*j +: 32] = $urandom;
        xfer(1'b1, cam_addr(LEFT_WING, k, j), ml[k][32*j +: 32], d);
        xfer(1'b1, cam_addr(RIGHT_WING, k, j), mr[k][32*j +: 32], d);
      end
    end
    compare_all("load");
    for (int t = 0; t < 160; t++) begin
      instr_t in;
      int nact, cyc;
      in = '0;
      in.a = wing_e'($urandom_range(1));
      in.b = ops[$urandom_range(6)];
      in.c = 8'($urandom_range(t % 5 == 0 ? 255 : 20));
      in.d = 8'($urandom);
      in.e = 8'($urandom);
      if (in.b == CAMX_MASK_SEARCH) begin
        int src;
        logic [X-1:0] msk;
        src = $urandom_range(N - 1);
        msk = '0;
        for (int b = 0; b < 3; b++) msk[$urandom_range(X - 1)] = 1'b1;
        if (t % 11 == 0) msk = '0;
        rsearch = (in.a == LEFT_WING) ? ml[src] : mr[src];
        rmask = msk;
        for (int j = 0; j < X / 32; j++) begin
          xfer(1'b1, 32'h100 + 32'(4 * j), rsearch[32*j +: 32], d);
          xfer(1'b1, 32'h200 + 32'(4 * j), rmask[32*j +: 32], d);
        end
      end
      model(in);
      nact = 0;
      foreach (vld[k]) nact += int'(vld[k]);
      if (nact != 0 && nact != N && in.b != CAMX_MASK_SEARCH) cnt_partial++;
      cnt_op[in.b]++;
      xfer(1'b1, 32'h0, 32'(in), d);
      cyc = 0;
      if (t % 3 != 0) while (busy) begin cyc++; @(negedge clk); end
      if (in.b != CAMX_MASK_SEARCH && t % 3 != 0) begin
        check(cyc == int'(in.c) + 3, $sformatf("latency %0d for W=%0d", cyc, int'(in.c) + 1));
        cnt_latency++;
      end
      if (in.b == CAMX_DATA_ADD) cnt_carry++;
      // every third command is followed at once by reads, which must wait
      if (t % 4 == 0 || t % 3 == 0) compare_all($sformatf("after %s", in.b.name()));
    end
    compare_all("final");
    // mechanism coverage
    foreach (ops[i]) begin
      check(cnt_op[ops[i]] > 0, $sformatf("instruction %s exercised", ops[i].name()));
    end
    check(cnt_partial > 0, "write-back with only some entries active");
    check(stalls > 0, "bus stalled while busy");
    $display("part 1: ops xor %0d and %0d or %0d add %0d copy %0d allwrite %0d search %0d, partial-active %0d, stalls %0d",
             cnt_op[CAMX_DATA_XOR], cnt_op[CAMX_DATA_AND], cnt_op[CAMX_DATA_OR], cnt_op[CAMX_DATA_ADD],
             cnt_op[CAMX_DATA_COPY], cnt_op[CAMX_ALL_WRITE], cnt_op[CAMX_MASK_SEARCH], cnt_partial, stalls);

    // ---------------- part 2: AES on all entries
    host_sel = 1;
    host_start = 1;
    wait (host_finished);
    check(n_search > 0 && n_allwrite > 0 && n_xor > 0 && n_copy > 0 && n_stall > 0,
          "AES program used search, rewrite, XOR, COPY and stalled");
    $display("AES, %0d blocks: cycles total %0d = SubBytes %0d + ShiftRows/MixColumns %0d + AddRoundKey %0d + load/unload %0d",
             N, cyc_total, cyc_sub, cyc_mix, cyc_ark, cyc_other);
    $display("AES instructions: search %0d, all-write %0d, xor %0d, copy %0d",
             n_search, n_allwrite, n_xor, n_copy);
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule
