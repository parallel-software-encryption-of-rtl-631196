// tb_camx_pe: self-checking test of one processing element (camx_pe).
// Drives the PE exactly as the controller does: the left bit one cycle
// (ld_store), the right bit and the ALU strobe the next. Random single-bit
// operations are compared with a reference, then 8-bit bit-serial additions
// check the carry chain (first clears it), and the valid flag is checked after
// reset (1) and after loads from the match input.
module tb_camx_pe;
  import camx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic l_bit = 0, r_bit = 0, ld_store = 0, alu_en = 0, first = 0, imm = 0;
  logic valid_ld = 0, match_in = 0;
  alu_e alu_op = ALU_XOR;
  logic op_q, valid_q;

  camx_pe dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one bit through the two PE stages; returns the operation register
  task automatic step(input alu_e op, input bit l, input bit r, input bit f,
                      input bit im, output bit res);
    @(negedge clk);
    l_bit = l; ld_store = 1; alu_en = 0;
    @(negedge clk);
    ld_store = 0; l_bit = ~l;   // must not matter any more
    r_bit = r; alu_en = 1; alu_op = op; first = f; imm = im;
    @(negedge clk);
    alu_en = 0;
    res = op_q;
  endtask

  initial begin
    bit res;
    repeat (2) @(negedge clk);
    check(valid_q == 1'b1, "valid flag set by reset");
    rst_n = 1;
    // single-bit operations
    for (int t = 0; t < 400; t++) begin
      alu_e op;
      bit l, r, im, exp;
      op = alu_e'($urandom_range(6));
      l = 1'($urandom); r = 1'($urandom); im = 1'($urandom);
      step(op, l, r, 1'b1, im, res);
      case (op)
        ALU_XOR:    exp = l ^ r;
        ALU_AND:    exp = l & r;
        ALU_OR:     exp = l | r;
        ALU_ADD:    exp = l ^ r;
        ALU_PASS_L: exp = l;
        ALU_PASS_R: exp = r;
        default:    exp = im;
      endcase
      check(res == exp, $sformatf("op %s l=%0b r=%0b", op.name(), l, r));
    end
    // 8-bit bit-serial additions, LSB first
    for (int t = 0; t < 200; t++) begin
      logic [7:0] a, b, sum;
      a = 8'($urandom); b = 8'($urandom);
      if (t == 0) begin a = 8'hFF; b = 8'h01; end
      for (int i = 0; i < 8; i++) begin
        step(ALU_ADD, a[i], b[i], i == 0, 1'b0, res);
        sum[i] = res;
      end
      check(sum == 8'(a + b), $sformatf("add %0h+%0h=%0h", a, b, sum));
    end
    // valid flag loads
    for (int t = 0; t < 50; t++) begin
      bit m;
      m = 1'($urandom);
      @(negedge clk);
      match_in = m; valid_ld = 1;
      @(negedge clk);
      valid_ld = 0; match_in = ~m;
      @(negedge clk);
      check(valid_q == m, "valid flag load/hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
