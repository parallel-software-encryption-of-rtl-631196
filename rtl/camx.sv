// camx: CAM-based massive-parallel SIMD matrix core (CAMX), the top level.
//
// Two CAM modules of N entries by X bits (the left and right "wings") hold the
// data vertically: entry k of both wings belongs to PE k. N one-bit PEs sit
// between them. Every instruction is broadcast to all PEs, so one instruction
// processes all N entries at once, bit-serially: a W-bit operation on all
// entries costs W+2 cycles whatever N is. A masked search of either wing sets
// each PE's valid flag to its entry's match result, and later write-backs only
// change entries whose flag is 1. Search followed by CAMX_ALL_WRITE is how
// table lookups (for example the AES S-box) are done in parallel.
//
// Blocks: camx_bus_if (system-bus slave, instruction and search registers),
// camx_ctrl (instruction sequencer), two camx_cam, N camx_pe.
// Ports: the system bus of camx_bus_if (see there for the address map and the
// handshake) plus busy and done from the controller. The host CPU and its
// SDRAM are outside. The organisation (two CAMs, 1-bit PEs, controller,
// interface module, alternate left/right reads) follows the document; the bus
// protocol and register map are this design's own.
module camx
  import camx_pkg::*;
#(
  parameter int N = 1024,
  parameter int X = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_req,
  input  logic        bus_we,
  input  logic [31:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic        bus_ready,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  output logic        busy,
  output logic        done
);

  localparam int PW = $clog2(X);
  localparam int EW = (N > 1) ? $clog2(N) : 1;
  localparam int WW = (X > 32) ? $clog2(X / 32) : 1;

  // interface module <-> controller / CAMs
  logic          cmd_valid;
  instr_t        cmd;
  logic [X-1:0]  search_din, mask_din;
  logic          l_w_en, r_w_en, w_we;
  logic [EW-1:0] w_entry;
  logic [WW-1:0] w_word;
  logic [31:0]   w_wdata, l_w_rdata, r_w_rdata;

  // controller outputs
  logic [PW-1:0] l_raddr, r_raddr, waddr;
  logic          l_we, r_we, l_srch_en, r_srch_en;
  logic          pe_ld_store, pe_alu_en, pe_first, pe_imm, pe_valid_ld;
  alu_e          pe_alu_op;
  wing_e         pe_valid_sel;

  // per-entry columns
  logic [N-1:0]  l_col, r_col, l_match, r_match, op_col, valid_col;

  camx_bus_if #(.N(N), .X(X)) u_if (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ready, .bus_rdata, .bus_rvalid,
    .cmd_valid, .cmd, .busy,
    .search_din, .mask_din,
    .l_w_en, .r_w_en, .w_we, .w_entry, .w_word, .w_wdata, .l_w_rdata, .r_w_rdata
  );

  camx_ctrl #(.X(X)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd, .busy, .done,
    .l_raddr, .r_raddr, .l_we, .r_we, .waddr,
    .l_srch_en, .r_srch_en,
    .pe_ld_store, .pe_alu_en, .pe_alu_op, .pe_first, .pe_imm,
    .pe_valid_ld, .pe_valid_sel
  );

  camx_cam #(.N(N), .X(X)) u_left (
    .clk,
    .col_raddr(l_raddr), .col_rdata(l_col),
    .col_we(l_we), .col_waddr(waddr), .col_wdata(op_col), .col_wmask(valid_col),
    .srch_en(l_srch_en), .srch_key(search_din), .srch_mask(mask_din), .match(l_match),
    .w_en(l_w_en), .w_we, .w_entry, .w_word, .w_wdata, .w_rdata(l_w_rdata)
  );

  camx_cam #(.N(N), .X(X)) u_right (
    .clk,
    .col_raddr(r_raddr), .col_rdata(r_col),
    .col_we(r_we), .col_waddr(waddr), .col_wdata(op_col), .col_wmask(valid_col),
    .srch_en(r_srch_en), .srch_key(search_din), .srch_mask(mask_din), .match(r_match),
    .w_en(r_w_en), .w_we, .w_entry, .w_word, .w_wdata, .w_rdata(r_w_rdata)
  );

  for (genvar k = 0; k < N; k++) begin : g_pe
    camx_pe u_pe (
      .clk, .rst_n,
      .l_bit(l_col[k]), .r_bit(r_col[k]),
      .ld_store(pe_ld_store), .alu_en(pe_alu_en), .alu_op(pe_alu_op),
      .first(pe_first), .imm(pe_imm),
      .valid_ld(pe_valid_ld),
      .match_in(pe_valid_sel == LEFT_WING ? l_match[k] : r_match[k]),
      .op_q(op_col[k]), .valid_q(valid_col[k])
    );
  end

endmodule
