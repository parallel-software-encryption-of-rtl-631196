// camx_pe: one 1-bit processing element of the CAMX core. N of them sit
// between the left and right CAM modules, one per entry, and all receive the
// same controls from the controller (SIMD).
//
// Bit-serial pipeline, as the document describes it: the bit from the left
// CAM is captured in the store register (ld_store) one cycle before the bit of
// the same significance arrives from the right CAM; in that next cycle the ALU
// combines store_q, r_bit and the carry register and the result is captured in
// the operation register (alu_en). The controller then writes op_q back into
// one of the CAM modules. The carry register makes multi-bit addition work LSB
// first; `first` marks bit 0 of an instruction and clears the carry in.
//
// The valid flag gates write-back: only entries whose flag is 1 are active.
// It is loaded from the CAM match line after a search (valid_ld). Reset sets
// it to 1, so every entry is active until the first search; a search with an
// all-zero mask makes every entry active again.
//
// ALU functions: XOR, AND, OR, ADD (sum bit with carry) follow the document;
// PASS_L / PASS_R (a copy between wings) and IMM (write an immediate bit, used
// by CAMX_ALL_WRITE) are this design's way of realising the move and rewrite
// instructions.
module camx_pe
  import camx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic l_bit,      // bit column from the left CAM module
  input  logic r_bit,      // bit column from the right CAM module
  input  logic ld_store,   // capture l_bit in the store register
  input  logic alu_en,     // compute and capture the operation register
  input  alu_e alu_op,
  input  logic first,      // bit 0 of an operation: carry in = 0
  input  logic imm,        // immediate bit for ALU_IMM
  input  logic valid_ld,   // load the valid flag from match_in
  input  logic match_in,
  output logic op_q,       // operation register
  output logic valid_q     // valid flag
);

  logic store_q;
  logic carry_q;
  logic cin, res, cout;

  always_comb begin
    cin  = first ? 1'b0 : carry_q;
    cout = carry_q;
    unique case (alu_op)
      ALU_XOR:    res = store_q ^ r_bit;
      ALU_AND:    res = store_q & r_bit;
      ALU_OR:     res = store_q | r_bit;
      ALU_ADD: begin
        res  = store_q ^ r_bit ^ cin;
        cout = (store_q & r_bit) | (cin & (store_q ^ r_bit));
      end
      ALU_PASS_L: res = store_q;
      ALU_PASS_R: res = r_bit;
      ALU_IMM:    res = imm;
      default:    res = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      store_q <= 1'b0;
      carry_q <= 1'b0;
      op_q    <= 1'b0;
      valid_q <= 1'b1;
    end else begin
      if (ld_store) store_q <= l_bit;
      if (alu_en) begin
        op_q    <= res;
        carry_q <= cout;
      end
      if (valid_ld) valid_q <= match_in;
    end
  end

endmodule
