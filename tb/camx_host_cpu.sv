// camx_host_cpu: behavioural model of the host CPU for the CAMX testbenches.
// It is a bus master on the CAMX system bus and runs AES-128 encryption of
// NE blocks in parallel, one block per CAM entry, all under the same key,
// as a CAMX instruction program; then it reads the ciphertexts back and
// compares them with camx_aes_ref_pkg.
//
// Data layout per entry (left wing L, right wing R, 256 bits each):
//   L[127:0]   AES state          L[135:128] constant 0x1b
//   R[127:0]   round key, and 2a during MixColumns
//   R[255:128] SubBytes+ShiftRows output t
// Program, per round:
//   SubBytes+ShiftRows  for each state byte k and each value v: search L
//       byte k == v, then CAMX_ALL_WRITE sbox(v) into the ShiftRows target byte
//       of t (right wing). 16*256 search/rewrite pairs.
//   MixColumns  with a = t ^ rot1(t) (rot = rotate rows within a column):
//       2a = a shifted left by one bit (one COPY across wings, then the bit
//       that crossed into each byte cleared with CAMX_ALL_WRITE), then XOR
//       with the stored 0x1b only in entries whose byte of a had its MSB set
//       (one search per byte), and finally s' = a ^ 2a ^ t ^ rot2 ^ rot3.
//   AddRoundKey  round key written with 16 CAMX_ALL_WRITE, one 128-bit XOR.
// Cycles are counted per phase (SubBytes, ShiftRows+MixColumns,
// AddRoundKey, other = loading and unloading) from start to finished, and
// the SubBytes count is checked against 14 cycles per search/rewrite pair.
module camx_host_cpu
  import camx_pkg::*;
  import camx_aes_ref_pkg::*;
#(
  parameter int NE = 1024,   // entries loaded, encrypted and checked
  parameter int X  = 256
) (
  input  logic        clk,
  input  logic        start,
  output logic        bus_req,
  output logic        bus_we,
  output logic [31:0] bus_addr,
  output logic [31:0] bus_wdata,
  input  logic        bus_ready,
  input  logic [31:0] bus_rdata,
  input  logic        bus_rvalid,
  output logic        finished,
  output int          checks,
  output int          failures,
  output longint      cyc_sub, cyc_mix, cyc_ark, cyc_other, cyc_total,
  output int          n_search, n_allwrite, n_xor, n_copy, n_stall
);
  localparam int WW = $clog2(X / 32);

  typedef enum int {PH_OTHER, PH_SUB, PH_MIX, PH_ARK} phase_e;
  phase_e phase = PH_OTHER;
  bit     running = 0;

  initial begin
    bus_req = 0; bus_we = 0; bus_addr = '0; bus_wdata = '0;
    finished = 0; checks = 0; failures = 0;
    cyc_sub = 0; cyc_mix = 0; cyc_ark = 0; cyc_other = 0; cyc_total = 0;
    n_search = 0; n_allwrite = 0; n_xor = 0; n_copy = 0; n_stall = 0;
  end

  always @(posedge clk) if (running) begin
    cyc_total++;
    case (phase)
      PH_SUB:  cyc_sub++;
      PH_MIX:  cyc_mix++;
      PH_ARK:  cyc_ark++;
      default: cyc_other++;
    endcase
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // one bus transfer; signals change at the falling edge
  task automatic bus_xfer(bit we, logic [31:0] addr, logic [31:0] wdata,
                          output logic [31:0] rdata);
    bus_req = 1; bus_we = we; bus_addr = addr; bus_wdata = wdata;
    #1;
    while (!bus_ready) begin
      n_stall++;
      @(negedge clk);
    end
    @(negedge clk);
    bus_req = 0;
    rdata = bus_rdata;
    if (!we) check(bus_rvalid, "read data valid one cycle after the transfer");
  endtask

  task automatic wr(logic [31:0] addr, logic [31:0] data);
    logic [31:0] unused;
    bus_xfer(1'b1, addr, data, unused);
  endtask

  function automatic logic [31:0] cam_addr(wing_e w, int entry, int word);
    return 32'h8000_0000 | (32'(w) << 30) | 32'(entry << (2 + WW)) | 32'(word << 2);
  endfunction

  task automatic instr(wing_e a, op_e b, int c, int d, int e);
    instr_t in;
    in = '0;
    in.a = a; in.b = b; in.c = 8'(c); in.d = 8'(d); in.e = 8'(e);
    case (b)
      CAMX_MASK_SEARCH: n_search++;
      CAMX_ALL_WRITE:   n_allwrite++;
      CAMX_DATA_XOR:    n_xor++;
      CAMX_DATA_COPY:   n_copy++;
      default: ;
    endcase
    wr({20'd0, REG_CMD}, 32'(in));
  endtask

  // search/mask register shadows: after the first search only changed words
  // are written
  logic [X-1:0] s_sh = '0, m_sh = '0;
  bit sh_known = 0;

  task automatic search(wing_e a, logic [X-1:0] key, logic [X-1:0] msk);
    for (int j = 0; j < X / 32; j++) begin
      if (!sh_known || m_sh[32*j +: 32] != msk[32*j +: 32])
        wr({20'd0, REG_MASK} + 32'(4 * j), msk[32*j +: 32]);
      if (!sh_known || s_sh[32*j +: 32] != key[32*j +: 32])
        wr({20'd0, REG_SEARCH} + 32'(4 * j), key[32*j +: 32]);
    end
    s_sh = key; m_sh = msk; sh_known = 1;
    instr(a, CAMX_MASK_SEARCH, 0, 0, 0);
  endtask

  task automatic all_valid();
    search(LEFT_WING, s_sh, '0);
  endtask

  task automatic load_round_key(block_t rk);
    for (int k = 0; k < 16; k++) instr(RIGHT_WING, CAMX_ALL_WRITE, 7, rk[8*k +: 8], 8 * k);
  endtask

  block_t key = from_fips(128'h2b7e151628aed2a6abf7158809cf4f3c);
  block_t pt [NE];

  initial begin
    rkeys_t rk;
    logic [7:0] sb [256];
    wait (start);
    @(negedge clk);
    running = 1;
    rk = key_expand(key);
    for (int v = 0; v < 256; v++) sb[v] = sbox(8'(v));
    // the document's example block goes in entry 0, random blocks elsewhere
    pt[0] = from_fips(128'h3243f6a8885a308d313198a2e0370734);
    for (int e = 1; e < NE; e++)
      pt[e] = {$urandom, $urandom, $urandom, $urandom};

    // ---- load: plaintext, constant 0x1b, round key 0
    phase = PH_OTHER;
    all_valid();
    for (int e = 0; e < NE; e++)
      for (int j = 0; j < 4; j++) wr(cam_addr(LEFT_WING, e, j), pt[e][32*j +: 32]);
    instr(LEFT_WING, CAMX_ALL_WRITE, 7, 8'h1b, 128);
    load_round_key(rk[0]);
    phase = PH_ARK;
    instr(LEFT_WING, CAMX_DATA_XOR, 127, 0, 0);

    for (int r = 1; r <= 10; r++) begin
      // ---- SubBytes fused with ShiftRows, state L[127:0] -> t R[255:128]
      phase = PH_SUB;
      for (int k = 0; k < 16; k++) begin
        int row, col, dst;
        row = k % 4; col = k / 4;
        dst = row + 4 * ((col - row + 4) % 4);
        for (int v = 0; v < 256; v++)
          begin
            search(LEFT_WING, X'(v) << (8 * k), X'(8'hff) << (8 * k));
            instr(RIGHT_WING, CAMX_ALL_WRITE, 7, sb[v], 128 + 8 * dst);
          end
      end
      phase = PH_MIX;
      all_valid();
      if (r != 10) begin
        // ---- MixColumns, t R[255:128] -> L[127:0]
        for (int c = 0; c < 4; c++) begin            // L := rot1(t)
          instr(LEFT_WING, CAMX_DATA_COPY, 23, 32 * c, 128 + 32 * c + 8);
          instr(LEFT_WING, CAMX_DATA_COPY, 7, 32 * c + 24, 128 + 32 * c);
        end
        instr(LEFT_WING, CAMX_DATA_XOR, 127, 0, 128);  // L := a = t ^ rot1(t)
        instr(RIGHT_WING, CAMX_DATA_COPY, 126, 0, 1);  // R[i+1] := L[i]
        for (int k = 0; k < 16; k++)                   // clear bit crossing bytes
          instr(RIGHT_WING, CAMX_ALL_WRITE, 0, 0, 8 * k);
        for (int k = 0; k < 16; k++) begin             // overflow: ^= 0x1b
          search(LEFT_WING, X'(1) << (8 * k + 7), X'(1) << (8 * k + 7));
          instr(RIGHT_WING, CAMX_DATA_XOR, 7, 128, 8 * k);
        end
        all_valid();
        instr(LEFT_WING, CAMX_DATA_XOR, 127, 0, 0);    // ^= 2a
        instr(LEFT_WING, CAMX_DATA_XOR, 127, 0, 128);  // ^= t
        for (int j = 2; j <= 3; j++)                   // ^= rot2(t), rot3(t)
          for (int c = 0; c < 4; c++) begin
            instr(LEFT_WING, CAMX_DATA_XOR, 8 * (4 - j) - 1, 32 * c, 128 + 32 * c + 8 * j);
            instr(LEFT_WING, CAMX_DATA_XOR, 8 * j - 1, 32 * c + 8 * (4 - j), 128 + 32 * c);
          end
      end else begin
        instr(LEFT_WING, CAMX_DATA_COPY, 127, 0, 128);
      end
      // ---- AddRoundKey
      phase = PH_ARK;
      load_round_key(rk[r]);
      instr(LEFT_WING, CAMX_DATA_XOR, 127, 0, 0);
    end

    // ---- unload and compare
    phase = PH_OTHER;
    for (int e = 0; e < NE; e++) begin
      block_t ct, exp;
      for (int j = 0; j < 4; j++) begin
        logic [31:0] d;
        bus_xfer(1'b0, cam_addr(LEFT_WING, e, j), '0, d);
        ct[32*j +: 32] = d;
      end
      exp = encrypt(pt[e], key);
      check(ct == exp, $sformatf("entry %0d ciphertext %h expected %h", e,
                                 to_fips(ct), to_fips(exp)));
      if (e == 0) begin
        check(to_fips(ct) == 128'h3925841d02dc09fbdc118597196a0b32,
              "FIPS-197 example ciphertext");
        $display("entry 0: plaintext %h key %h ciphertext %h", to_fips(pt[0]),
                 to_fips(key), to_fips(ct));
      end
    end
    // Each search/rewrite pair costs 14 cycles whatever the number of entries:
    // rewrite busy 10 (W+2), search busy 2, one transfer each for the search
    // word, the search command and the rewrite command.
    check(cyc_sub >= 64'(10 * 4096 * 14) && cyc_sub < 64'(10 * 4096 * 14 + 10 * 256),
          $sformatf("SubBytes cycles %0d: 14 per byte position and value", cyc_sub));
    running = 0;
    finished = 1;
  end
endmodule
