// camx_bus_if: interface module between the system bus and the CAMX core.
//
// The host CPU reaches CAMX as a memory-mapped 32-bit slave:
//   addr[31] = 1  CAM space: addr[30] picks the wing (0 left, 1 right),
//                 addr[2 +: WW] the 32-bit word inside an entry and
//                 addr[2+WW +: EW] the entry. Reads and writes go straight to
//                 the addressed CAM module's word port.
//   addr[31] = 0  registers (low 12 bits of the byte address):
//                 0x000 CMD     write: an instruction word (camx_pkg::instr_t)
//                 0x004 STATUS  read: bit 0 = busy
//                 0x100+4j      SEARCH_DIN word j (comparison data bits 32j+31..32j)
//                 0x200+4j      MASK_DIN word j (mask data, 1 = compare)
// Handshake: the host holds bus_req (with bus_we, bus_addr, bus_wdata) until
// bus_ready is high; the transfer happens in that cycle. A read returns its
// data on bus_rdata one cycle later with bus_rvalid. CMD writes and CAM
// accesses wait (bus_ready low) while the core is busy; SEARCH_DIN/MASK_DIN
// writes and STATUS reads are always accepted, so the next search pattern can
// be loaded while an instruction runs. Unmapped reads return 0.
// The document gives the module's role (CAM data access by address,
// instructions and SEARCH_DIN/MASK_DIN from the CPU); the address map and the
// handshake are this design's own.
module camx_bus_if
  import camx_pkg::*;
#(
  parameter int N  = 1024,
  parameter int X  = 256,
  localparam int EW = (N > 1) ? $clog2(N) : 1,
  localparam int WW = (X > 32) ? $clog2(X / 32) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // system bus slave
  input  logic          bus_req,
  input  logic          bus_we,
  input  logic [31:0]   bus_addr,
  input  logic [31:0]   bus_wdata,
  output logic          bus_ready,
  output logic [31:0]   bus_rdata,
  output logic          bus_rvalid,
  // controller
  output logic          cmd_valid,
  output instr_t        cmd,
  input  logic          busy,
  // search registers
  output logic [X-1:0]  search_din,
  output logic [X-1:0]  mask_din,
  // CAM word ports
  output logic          l_w_en,
  output logic          r_w_en,
  output logic          w_we,
  output logic [EW-1:0] w_entry,
  output logic [WW-1:0] w_word,
  output logic [31:0]   w_wdata,
  input  logic [31:0]   l_w_rdata,
  input  logic [31:0]   r_w_rdata
);

  localparam int NW = X / 32;

  typedef enum logic [1:0] {RD_ZERO, RD_STATUS, RD_LEFT, RD_RIGHT} rsel_e;

  logic        is_cam, is_cmd, is_status, is_srch, is_mask;
  logic [11:0] roff;
  logic [WW-1:0] rj;
  logic        xfer;
  rsel_e       rsel_q;
  logic        status_q;

  always_comb begin
    roff      = bus_addr[11:0];
    rj        = WW'(roff[7:2]);
    is_cam    = bus_addr[CAM_SPACE_BIT];
    is_cmd    = !is_cam && roff == REG_CMD;
    is_status = !is_cam && roff == REG_STATUS;
    is_srch   = !is_cam && roff[11:8] == REG_SEARCH[11:8] && int'(roff[7:2]) < NW;
    is_mask   = !is_cam && roff[11:8] == REG_MASK[11:8]   && int'(roff[7:2]) < NW;
    bus_ready = !(busy && (is_cam || is_cmd));
    xfer      = bus_req && bus_ready;

    cmd_valid = xfer && bus_we && is_cmd;
    cmd       = instr_t'(bus_wdata);

    l_w_en    = xfer && is_cam && !bus_addr[CAM_WING_BIT];
    r_w_en    = xfer && is_cam &&  bus_addr[CAM_WING_BIT];
    w_we      = bus_we;
    w_word    = bus_addr[2 +: WW];
    w_entry   = bus_addr[2 + WW +: EW];
    w_wdata   = bus_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      search_din <= '0;
      mask_din   <= '0;
      bus_rvalid <= 1'b0;
      rsel_q     <= RD_ZERO;
      status_q   <= 1'b0;
    end else begin
      if (xfer && bus_we && is_srch) search_din[32*rj +: 32] <= bus_wdata;
      if (xfer && bus_we && is_mask) mask_din[32*rj +: 32]   <= bus_wdata;
      bus_rvalid <= xfer && !bus_we;
      status_q   <= busy;
      if (xfer && !bus_we) begin
        if (is_cam)         rsel_q <= bus_addr[CAM_WING_BIT] ? RD_RIGHT : RD_LEFT;
        else if (is_status) rsel_q <= RD_STATUS;
        else                rsel_q <= RD_ZERO;
      end
    end
  end

  always_comb begin
    unique case (rsel_q)
      RD_STATUS: bus_rdata = {31'd0, status_q};
      RD_LEFT:   bus_rdata = l_w_rdata;
      RD_RIGHT:  bus_rdata = r_w_rdata;
      default:   bus_rdata = '0;
    endcase
  end

  // A transfer only completes when the slave is ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cmd_valid || l_w_en || r_w_en) |-> !busy);

endmodule
