// camx_cam: one CAM module ("wing") of the CAMX core, N entries by X bits.
//
// The array is used three ways:
//  * Bit-serial processing. Every cycle the controller names one bit position
//    and the module presents that bit of all N entries at once (col_rdata,
//    a combinational column read). A column is written back the same way: bit
//    col_waddr of entry k takes col_wdata[k] where col_wmask[k] is set; the
//    mask carries the PEs' valid flags so only active entries change.
//  * Masked search. With srch_en high, each entry compares itself with
//    srch_key on the positions where srch_mask is 1 (mask 0 = don't care) and
//    the per-entry result is registered in match at the clock edge. An all-zero
//    mask matches every entry.
//  * Word access for the host. Entry w_entry, 32-bit word w_word (bits
//    32*w_word+31 .. 32*w_word) is written when w_en and w_we are high, or read
//    into w_rdata, valid the cycle after w_en with w_we low.
// Column access, masked search with mask and comparison data, and host access
// by address follow the document; the port set, one-cycle search latency and
// the 32-bit word port are this design's choices. The controller never issues
// a word access and a column write in the same cycle; if it happened the
// column write would be applied last.
module camx_cam #(
  parameter int N  = 1024,
  parameter int X  = 256,
  localparam int PW = $clog2(X),
  localparam int EW = (N > 1) ? $clog2(N) : 1,
  localparam int WW = (X > 32) ? $clog2(X / 32) : 1
) (
  input  logic          clk,
  // bit-column read
  input  logic [PW-1:0] col_raddr,
  output logic [N-1:0]  col_rdata,
  // bit-column write
  input  logic          col_we,
  input  logic [PW-1:0] col_waddr,
  input  logic [N-1:0]  col_wdata,
  input  logic [N-1:0]  col_wmask,
  // masked search
  input  logic          srch_en,
  input  logic [X-1:0]  srch_key,
  input  logic [X-1:0]  srch_mask,
  output logic [N-1:0]  match,
  // host word port
  input  logic          w_en,
  input  logic          w_we,
  input  logic [EW-1:0] w_entry,
  input  logic [WW-1:0] w_word,
  input  logic [31:0]   w_wdata,
  output logic [31:0]   w_rdata
);

  logic [X-1:0] mem [N];

  always_comb begin
    for (int k = 0; k < N; k++) col_rdata[k] = mem[k][col_raddr];
  end

  always_ff @(posedge clk) begin
    if (w_en && w_we) mem[w_entry][32*w_word +: 32] <= w_wdata;
    if (col_we) begin
      for (int k = 0; k < N; k++)
        if (col_wmask[k]) mem[k][col_waddr] <= col_wdata[k];
    end
  end

  always_ff @(posedge clk) begin
    if (w_en && !w_we) w_rdata <= mem[w_entry][32*w_word +: 32];
  end

  always_ff @(posedge clk) begin
    if (srch_en) begin
      for (int k = 0; k < N; k++)
        match[k] <= (((mem[k] ^ srch_key) & srch_mask) == '0);
    end
  end

  initial begin
    assert (X % 32 == 0 && X <= 256)
      else $error("camx_cam: X must be a multiple of 32 and at most 256");
  end

endmodule
