// tb_camx_bus_if: self-checking test of the CAMX interface module
// (camx_bus_if). Small behavioural CAM word ports answer reads with a value
// derived from the address. The test checks address decoding of CAM space
// (wing, entry, word), the SEARCH_DIN/MASK_DIN registers, CMD decoding into
// the instruction struct, STATUS reads, read latency (one cycle, rvalid), and
// that CMD and CAM accesses wait while the core is busy while search-register
// writes do not.
module tb_camx_bus_if;
  import camx_pkg::*;
  localparam int N  = 64;
  localparam int X  = 256;
  localparam int EW = $clog2(N);
  localparam int WW = $clog2(X / 32);

  logic clk = 0, rst_n = 0;
  logic bus_req = 0, bus_we = 0;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_ready, bus_rvalid;
  logic cmd_valid;
  instr_t cmd;
  logic busy = 0;
  logic [X-1:0] search_din, mask_din;
  logic l_w_en, r_w_en, w_we;
  logic [EW-1:0] w_entry;
  logic [WW-1:0] w_word;
  logic [31:0] w_wdata, l_w_rdata, r_w_rdata;

  camx_bus_if #(.N(N), .X(X)) dut (.*);

  always #5 clk = ~clk;

  // CAM word-port stand-ins: registered read of a code made from the address
  always_ff @(posedge clk) begin
    if (l_w_en && !w_we) l_w_rdata <= {16'h1EF7, 6'd0, w_entry, w_word[2:0], 1'b0};
    if (r_w_en && !w_we) r_w_rdata <= {16'h8167, 6'd0, w_entry, w_word[2:0], 1'b1};
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] cam_addr(bit wing, int entry, int word);
    return 32'h8000_0000 | (32'(wing) << 30) | 32'(entry << (2 + WW)) | 32'(word << 2);
  endfunction

  logic [X-1:0] exp_s = '0, exp_m = '0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // CAM writes: decoded wing/entry/word/data
    for (int t = 0; t < 100; t++) begin
      bit wing;
      int e, w;
      wing = 1'($urandom); e = $urandom_range(N - 1); w = $urandom_range(X / 32 - 1);
      bus_req = 1; bus_we = 1; bus_addr = cam_addr(wing, e, w); bus_wdata = $urandom;
      #1;
      check(bus_ready && l_w_en == !wing && r_w_en == wing && w_we, "cam write strobe");
      check(w_entry == EW'(e) && w_word == WW'(w) && w_wdata == bus_wdata, "cam write fields");
      check(!cmd_valid, "no command on cam write");
      @(negedge clk);
      bus_req = 0;
    end
    // CAM reads: data one cycle later from the right wing
    for (int t = 0; t < 100; t++) begin
      bit wing;
      int e, w;
      wing = 1'($urandom); e = $urandom_range(N - 1); w = $urandom_range(X / 32 - 1);
      bus_req = 1; bus_we = 0; bus_addr = cam_addr(wing, e, w);
      @(negedge clk);
      bus_req = 0;
      check(bus_rvalid, "read valid after one cycle");
      check(bus_rdata == {wing ? 16'h8167 : 16'h1EF7, 6'd0, EW'(e), 3'(w), wing},
            "cam read data");
    end
    // search and mask registers
    for (int t = 0; t < 64; t++) begin
      int j;
      bit m;
      logic [31:0] v;
      j = $urandom_range(X / 32 - 1); m = 1'($urandom); v = $urandom;
      busy = 1'($urandom);            // never stalls these writes
      bus_req = 1; bus_we = 1; bus_addr = 32'(m ? 12'h200 : 12'h100) + 32'(4 * j);
      bus_wdata = v;
      if (m) exp_m[32*j +: 32] = v; else exp_s[32*j +: 32] = v;
      #1;
      check(bus_ready, "search register write never waits");
      @(negedge clk);
      bus_req = 0; busy = 0;
      check(search_din == exp_s && mask_din == exp_m, "search/mask registers");
    end
    // command decoding
    for (int t = 0; t < 50; t++) begin
      instr_t in;
      in = instr_t'($urandom);
      bus_req = 1; bus_we = 1; bus_addr = 32'h0; bus_wdata = 32'(in);
      #1;
      check(cmd_valid && cmd == in, "command decode");
      @(negedge clk);
      bus_req = 0;
    end
    // busy: command and CAM access wait, status reads show busy
    busy = 1;
    bus_req = 1; bus_we = 1; bus_addr = 32'h0; bus_wdata = 32'h0900_0000;
    #1;
    check(!bus_ready && !cmd_valid, "command waits while busy");
    @(negedge clk);
    bus_addr = cam_addr(1'b0, 3, 1);
    #1;
    check(!bus_ready && !l_w_en, "cam access waits while busy");
    @(negedge clk);
    bus_we = 0; bus_addr = 32'h4;
    #1;
    check(bus_ready, "status read accepted while busy");
    @(negedge clk);
    bus_req = 0;
    check(bus_rvalid && bus_rdata == 32'd1, "status shows busy");
    busy = 0;
    @(negedge clk);
    bus_req = 1; bus_we = 0; bus_addr = 32'h4;
    @(negedge clk);
    bus_req = 0;
    check(bus_rvalid && bus_rdata == 32'd0, "status shows idle");
    bus_req = 1; bus_we = 0; bus_addr = 32'h10;
    @(negedge clk);
    bus_req = 0;
    check(bus_rvalid && bus_rdata == 32'd0, "unmapped read is zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
