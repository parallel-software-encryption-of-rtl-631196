// tb_camx_ctrl: self-checking test of the CAMX controller (camx_ctrl).
// Random instructions are issued one at a time. For every cycle of an
// instruction the testbench records the controls and compares them with what
// the instruction means: the left-read positions D+i, right-read positions
// E+i one cycle later, ALU function, first-bit and immediate bits, write-back
// wing and positions, search strobes and valid-flag load, the busy length
// (W+2 cycles for bit-serial instructions, 2 for a search) and the done pulse.
module tb_camx_ctrl;
  import camx_pkg::*;
  localparam int X  = 256;
  localparam int PW = $clog2(X);

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  instr_t cmd = '0;
  logic busy, done;
  logic [PW-1:0] l_raddr, r_raddr, waddr;
  logic l_we, r_we, l_srch_en, r_srch_en;
  logic pe_ld_store, pe_alu_en, pe_first, pe_imm, pe_valid_ld;
  alu_e pe_alu_op;
  wing_e pe_valid_sel;

  camx_ctrl #(.X(X)) dut (.*);

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic alu_e exp_alu(op_e b, wing_e a);
    case (b)
      CAMX_DATA_XOR:  return ALU_XOR;
      CAMX_DATA_AND:  return ALU_AND;
      CAMX_DATA_OR:   return ALU_OR;
      CAMX_DATA_ADD:  return ALU_ADD;
      CAMX_DATA_COPY: return (a == LEFT_WING) ? ALU_PASS_R : ALU_PASS_L;
      default:        return ALU_IMM;
    endcase
  endfunction

  initial begin
    op_e ops[7] = '{CAMX_DATA_XOR, CAMX_DATA_AND, CAMX_DATA_OR, CAMX_DATA_ADD,
                    CAMX_DATA_COPY, CAMX_ALL_WRITE, CAMX_MASK_SEARCH};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      instr_t in;
      int w, nbusy, nld, nalu, nwr, nsrch, nvld, ndone;
      bit srch;
      in = '0;
      in.a = wing_e'($urandom_range(1));
      in.b = ops[$urandom_range(6)];
      in.c = (t < 20) ? 8'(t) : (t == 20 ? 8'd255 : 8'($urandom_range(40)));
      in.d = 8'($urandom);
      in.e = 8'($urandom);
      w = int'(in.c) + 1;
      srch = (in.b == CAMX_MASK_SEARCH);
      check(!busy, "idle before issue");
      cmd = in; cmd_valid = 1;
      @(negedge clk);
      cmd_valid = 0; cmd = '0;
      nbusy = 0; nld = 0; nalu = 0; nwr = 0; nsrch = 0; nvld = 0; ndone = 0;
      while (busy && nbusy < 400) begin
        nbusy++;
        if (pe_ld_store) begin
          check(l_raddr == PW'(int'(in.d) + nld), "left read position");
          nld++;
        end
        if (pe_alu_en) begin
          check(r_raddr == PW'(int'(in.e) + nalu), "right read position");
          check(pe_alu_op == exp_alu(in.b, in.a), "alu op");
          check(pe_first == (nalu == 0), "first bit");
          if (in.b == CAMX_ALL_WRITE)
            check(pe_imm == ((nalu < 8) ? in.d[nalu] : 1'b0), "immediate bit");
          check(nalu < nld, "right read after left read");
          nalu++;
        end
        if (l_we || r_we) begin
          int base;
          base = (in.b == CAMX_ALL_WRITE || in.a == RIGHT_WING) ? int'(in.e) : int'(in.d);
          check(l_we == (in.a == LEFT_WING) && r_we == (in.a == RIGHT_WING), "write wing");
          check(waddr == PW'(base + nwr), "write position");
          check(nwr < nalu, "write after alu");
          nwr++;
        end
        if (l_srch_en || r_srch_en) begin
          check(l_srch_en == (in.a == LEFT_WING) && r_srch_en == (in.a == RIGHT_WING),
                "search wing");
          nsrch++;
        end
        if (pe_valid_ld) begin
          check(pe_valid_sel == in.a && nsrch == 1, "valid load after search");
          nvld++;
        end
        if (done) begin
          ndone++;
          check(nbusy == (srch ? 2 : w + 2), "done in last busy cycle");
        end
        @(negedge clk);
      end
      check(nbusy == (srch ? 2 : w + 2),
            $sformatf("busy cycles %0d for %s W=%0d", nbusy, in.b.name(), w));
      check(ndone == 1, "one done pulse");
      if (srch) check(nsrch == 1 && nvld == 1 && nld == 0 && nwr == 0, "search shape");
      else      check(nld == w && nalu == w && nwr == w && nsrch == 0 && nvld == 0,
                      $sformatf("bit counts %0d %0d %0d W=%0d", nld, nalu, nwr, w));
      // a command offered while busy must wait
      if (t % 7 == 0) begin
        instr_t in2;
        in2 = in; in2.b = CAMX_DATA_XOR; in2.c = 8'd3;
        cmd = in2; cmd_valid = 1;
        @(negedge clk);
        check(busy, "accepted");
        cmd_valid = 1;        // offered again while busy: ignored
        @(negedge clk);
        cmd_valid = 0;
        nbusy = 1;
        while (busy) begin nbusy++; @(negedge clk); end
        check(nbusy == 4 + 2, $sformatf("command offered while busy was not taken (%0d)", nbusy));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
