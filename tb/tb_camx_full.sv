// tb_camx_full: the CAMX core at its full size (1024 entries of 256 bits in
// each CAM module, the top's default parameters) encrypting 1024 AES-128
// blocks in parallel. The host CPU model loads 1024 plaintexts (entry 0 holds
// the FIPS-197 example block), runs the instruction program, reads all 1024
// ciphertexts back and compares them with the reference AES. The cycle
// breakdown and the cycles per byte (total cycles / (1024 * 16 bytes)) are
// printed, and the rate is checked against the 83.17 cycles per byte
// published for CAMX at this size.
module tb_camx_full;
  logic clk = 0, rst_n = 0;
  logic bus_req, bus_we, bus_ready, bus_rvalid, busy, done;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic start = 0, finished;
  int h_checks, h_failures, n_search, n_allwrite, n_xor, n_copy, n_stall;
  longint cyc_sub, cyc_mix, cyc_ark, cyc_other, cyc_total;

  camx dut (.*);

  camx_host_cpu #(.NE(1024)) host (
    .clk, .start,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ready, .bus_rdata, .bus_rvalid,
    .finished, .checks(h_checks), .failures(h_failures),
    .cyc_sub, .cyc_mix, .cyc_ark, .cyc_other, .cyc_total,
    .n_search, .n_allwrite, .n_xor, .n_copy, .n_stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    wait (finished);
    checks++;
    if (!(n_stall > 0 && n_search > 0)) failures++;
    // rate: at least as fast as the 83.17 cycles per byte published for CAMX
    checks++;
    if (real'(cyc_total) / (1024.0 * 16.0) > 83.17) begin
      failures++;
      $display("FAIL: %0.2f cycles per byte", real'(cyc_total) / (1024.0 * 16.0));
    end
    $display("AES, 1024 blocks: cycles total %0d = SubBytes %0d + ShiftRows/MixColumns %0d + AddRoundKey %0d + load/unload %0d",
             cyc_total, cyc_sub, cyc_mix, cyc_ark, cyc_other);
    $display("cycles per byte: %0.2f", real'(cyc_total) / (1024.0 * 16.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks + h_checks, failures + h_failures);
    $finish;
  end
endmodule
