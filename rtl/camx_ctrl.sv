// camx_ctrl: CAMX controller. It takes one CAMXLIB instruction at a time and
// broadcasts the per-cycle controls to both CAM modules and all PEs.
//
// Basic instructions (XOR, AND, OR, ADD, COPY) and CAMX_ALL_WRITE run a
// three-stage bit-serial pipeline over W = C+1 bits, LSB first:
//   stage 0  read bit D+i of the left CAM into the PE store registers
//   stage 1  read bit E+i of the right CAM, ALU -> PE operation registers
//   stage 2  write the operation registers to wing A, at D+i (left) or E+i
//            (right); only entries with valid flag 1 are written
// Left and right CAM are thus read in alternate cycles for the same bit, as in
// the document, and a new bit enters every cycle. For CAMX_ALL_WRITE, D is the
// data (bit i of D, zero above bit 7) and E the target position in wing A.
// CAMX_MASK_SEARCH searches wing A with the SEARCH_DIN/MASK_DIN registers
// (cycle 1) and loads the match lines into the valid flags (cycle 2).
//
// Timing: an instruction is accepted in the cycle cmd_valid && !busy; busy is
// then high for exactly W+2 cycles (basic, ALL_WRITE) or 2 cycles (search),
// and done pulses in the last busy cycle. Undefined opcodes are accepted and
// ignored. Positions wrap modulo X. The field meanings follow the document;
// the pipeline depth, the accept/busy handshake and the ignore-undefined rule
// are this design's choices.
module camx_ctrl
  import camx_pkg::*;
#(
  parameter int X = 256,
  localparam int PW = $clog2(X)
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction input
  input  logic          cmd_valid,
  input  instr_t        cmd,
  output logic          busy,
  output logic          done,
  // CAM column reads
  output logic [PW-1:0] l_raddr,
  output logic [PW-1:0] r_raddr,
  // CAM column writes
  output logic          l_we,
  output logic          r_we,
  output logic [PW-1:0] waddr,
  // searches
  output logic          l_srch_en,
  output logic          r_srch_en,
  // PE controls
  output logic          pe_ld_store,
  output logic          pe_alu_en,
  output alu_e          pe_alu_op,
  output logic          pe_first,
  output logic          pe_imm,
  output logic          pe_valid_ld,
  output wing_e         pe_valid_sel
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SRCH, S_LOAD} state_e;

  state_e     state;
  wing_e      wing_q;
  op_e        op_q;
  alu_e       alu_q;
  logic [7:0] last_q;   // index of the last bit (C)
  logic [7:0] d_q, e_q;
  logic [7:0] i_q;      // stage-0 bit index

  logic       s1_v, s2_v;
  logic [7:0] s1_i;
  logic [PW-1:0] s2_addr;
  wing_e      s2_wing;

  logic accept;
  assign busy   = (state != S_IDLE) || s1_v || s2_v;
  assign accept = cmd_valid && !busy;

  function automatic alu_e alu_of(op_e op, wing_e a);
    case (op)
      CAMX_DATA_XOR:  return ALU_XOR;
      CAMX_DATA_AND:  return ALU_AND;
      CAMX_DATA_OR:   return ALU_OR;
      CAMX_DATA_ADD:  return ALU_ADD;
      CAMX_DATA_COPY: return (a == LEFT_WING) ? ALU_PASS_R : ALU_PASS_L;
      default:        return ALU_IMM;
    endcase
  endfunction

  function automatic logic is_bitserial(op_e op);
    case (op)
      CAMX_DATA_XOR, CAMX_DATA_AND, CAMX_DATA_OR, CAMX_DATA_ADD,
      CAMX_DATA_COPY, CAMX_ALL_WRITE: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wing_q  <= LEFT_WING;
      op_q    <= CAMX_DATA_XOR;
      alu_q   <= ALU_XOR;
      last_q  <= '0;
      d_q     <= '0;
      e_q     <= '0;
      i_q     <= '0;
      s1_v    <= 1'b0;
      s1_i    <= '0;
      s2_v    <= 1'b0;
      s2_addr <= '0;
      s2_wing <= LEFT_WING;
    end else begin
      // stage 0 -> stage 1
      s1_v <= (state == S_RUN);
      s1_i <= i_q;
      // stage 1 -> stage 2
      s2_v    <= s1_v;
      s2_wing <= wing_q;
      if (op_q == CAMX_ALL_WRITE || wing_q == RIGHT_WING)
        s2_addr <= PW'(e_q + s1_i);
      else
        s2_addr <= PW'(d_q + s1_i);

      unique case (state)
        S_IDLE: if (accept) begin
          wing_q <= cmd.a;
          op_q   <= cmd.b;
          alu_q  <= alu_of(cmd.b, cmd.a);
          last_q <= cmd.c;
          d_q    <= cmd.d;
          e_q    <= cmd.e;
          i_q    <= '0;
          if (is_bitserial(cmd.b))            state <= S_RUN;
          else if (cmd.b == CAMX_MASK_SEARCH) state <= S_SRCH;
        end
        S_RUN: begin
          i_q <= i_q + 8'd1;
          if (i_q == last_q) state <= S_IDLE;
        end
        S_SRCH: state <= S_LOAD;
        S_LOAD: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    l_raddr      = PW'(d_q + i_q);
    r_raddr      = PW'(e_q + s1_i);
    pe_ld_store  = (state == S_RUN);
    pe_alu_en    = s1_v;
    pe_alu_op    = alu_q;
    pe_first     = (s1_i == 8'd0);
    pe_imm       = (s1_i < 8'd8) ? d_q[s1_i[2:0]] : 1'b0;
    waddr        = s2_addr;
    l_we         = s2_v && (s2_wing == LEFT_WING);
    r_we         = s2_v && (s2_wing == RIGHT_WING);
    l_srch_en    = (state == S_SRCH) && (wing_q == LEFT_WING);
    r_srch_en    = (state == S_SRCH) && (wing_q == RIGHT_WING);
    pe_valid_ld  = (state == S_LOAD);
    pe_valid_sel = wing_q;
    done         = (state == S_LOAD) ||
                   (s2_v && !s1_v && state == S_IDLE);
  end

  // A write-back never overlaps a new instruction's first read.
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !s2_v);

endmodule
