// camx_pkg: types and constants shared by the CAMX core.
//
// CAMX is a bit-serial, word-parallel SIMD engine: two CAM arrays ("wings")
// of N entries by X bits, with one 1-bit processing element per entry between
// them. The host CPU drives it with 32-bit instruction words that carry the
// five CAMXLIB fields:
//   A  wing that receives the result (LEFT_WING / RIGHT_WING)
//   B  operation
//   C  bit width minus one (8'b0000_0011 means 4 bits)
//   D  left-wing bit position (for CAMX_ALL_WRITE: the data to write)
//   E  right-wing bit position (for CAMX_ALL_WRITE: the target position)
// Instruction word layout (this design's encoding):
//   [31] A, [27:24] B, [23:16] C, [15:8] D, [7:0] E.
// The operation names follow the document; COPY is this design's addition
// (a plain move between wings, one of the "etc." basic operations).
package camx_pkg;

  typedef enum logic {
    LEFT_WING  = 1'b0,
    RIGHT_WING = 1'b1
  } wing_e;

  typedef enum logic [3:0] {
    CAMX_DATA_XOR    = 4'h0,
    CAMX_DATA_AND    = 4'h1,
    CAMX_DATA_OR     = 4'h2,
    CAMX_DATA_ADD    = 4'h3,
    CAMX_DATA_COPY   = 4'h4,
    CAMX_MASK_SEARCH = 4'h8,
    CAMX_ALL_WRITE   = 4'h9
  } op_e;

  // PE ALU function, as sent by the controller to every PE.
  typedef enum logic [2:0] {
    ALU_XOR  = 3'd0,
    ALU_AND  = 3'd1,
    ALU_OR   = 3'd2,
    ALU_ADD  = 3'd3,
    ALU_PASS_L = 3'd4,   // result = left-wing bit
    ALU_PASS_R = 3'd5,   // result = right-wing bit
    ALU_IMM  = 3'd6      // result = immediate bit from the controller
  } alu_e;

  typedef struct packed {
    wing_e      a;
    logic [2:0] rsvd;
    op_e        b;
    logic [7:0] c;
    logic [7:0] d;
    logic [7:0] e;
  } instr_t;

  // Bus register map (byte offsets, CAM space bit clear).
  localparam logic [11:0] REG_CMD    = 12'h000;
  localparam logic [11:0] REG_STATUS = 12'h004;
  localparam logic [11:0] REG_SEARCH = 12'h100;  // + 4*j, j < X/32
  localparam logic [11:0] REG_MASK   = 12'h200;  // + 4*j, j < X/32
  // CAM space: addr[31] = 1, addr[30] = wing, addr[..:2] = {entry, word}.
  localparam int CAM_SPACE_BIT = 31;
  localparam int CAM_WING_BIT  = 30;

endpackage
