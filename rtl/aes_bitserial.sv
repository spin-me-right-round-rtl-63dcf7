// aes_bitserial: bit-serial AES-128 encryption core built around the
// rotational-symmetry S-box, unprotected (SHARES = 1) or first-order masked
// (SHARES = 2).
//
// Each share has its own state array (four 32-bit row shift registers and a
// bit-serial MixColumns) and key array (four row shift registers with the
// key-schedule input logic). All linear operations - AddRoundKey, ShiftRows,
// MixColumns, the key-schedule XORs - are done share by share. One S-box,
// fed one bit per share per cycle, serves both the round function and the key
// schedule: sbox_rs_serial (latency 16) when unprotected, sbox_masked
// (latency 26, 6 fresh random bits per cycle) when masked. The round constant
// enters share 0 only. aes_ctrl sequences everything.
//
// Interface: pulse `start`; during the following 128 cycles (load_req high)
// bit b of byte n of the plaintext and key shares is taken on pt_i/key_i in
// cycle 8n+b (AES byte order, LSB first). After the 10 rounds the ciphertext
// shares leave on ct_o in the same order while ct_valid is high; `done` marks
// the last bit. Total: 4384 cycles unprotected, 6384 masked, from the first
// loaded bit to the last ciphertext bit. rnd is not used when SHARES = 1.
// MASK_KEY = 0 (masked core only) keeps the key schedule in a single share:
// the key shares are XORed on loading, one key array is built, the S-box
// output shares are XORed before they enter it, and the round key is added
// to share 0 only. Its upper key_ld/key_sb bits are then unused.
// The controller's round number and the state arrays' per-row outputs are
// not needed here and are left unconnected.
// Architecture and S-boxes follow the document; the bit order, handshake and
// schedule (hence the cycle counts, which differ from the document's) are
// this design's own.
module aes_bitserial
  import aes_bs_pkg::*;
#(
  parameter int unsigned SHARES   = 1,
  parameter bit          MASK_KEY = 1   // 0: key schedule in one share (SHARES = 2 only)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [SHARES-1:0] pt_i,     // plaintext bit of each share
  input  logic [SHARES-1:0] key_i,    // key bit of each share
  input  logic [5:0]        rnd,      // fresh randomness (masked core only)
  output logic [SHARES-1:0] ct_o,     // ciphertext bit of each share
  output logic              ct_valid,
  output logic              load_req,
  output logic              done
);
  localparam int unsigned SB_LAT     = (SHARES == 1) ? 16 : 26;
  localparam int unsigned KEY_SHARES = MASK_KEY ? SHARES : 1;

  phase_t         phase;
  logic [3:0]     st_shift, key_shift;
  st_src_t [3:0]  st_src;
  key_src_t [3:0] key_src;
  logic [1:0]     st_row, key_row;
  logic [4:0]     key_addr;
  logic           rcon_bit, sb_start;
  logic [2:0]     bit_idx;
  sb_src_t        sb_src;

  logic [SHARES-1:0] st_head, key_head, key_rd, sb_x, sb_y;
  logic              sb_valid;
  logic [SHARES-1:0] key_ld, key_sb;   // key array inputs: load bit, S-box bit

  aes_ctrl #(.SB_LAT(SB_LAT)) u_ctrl (
    .clk, .rst_n, .start, .phase, .st_shift, .st_src, .st_row, .key_shift,
    .key_src, .key_row, .key_addr, .rcon_bit, .bit_idx, .sb_start, .sb_src,
    .load_req, .ct_valid, .done, .round()
  );

  for (genvar s = 0; s < SHARES; s++) begin : g_share
    state_array u_state (
      .clk, .shift(st_shift), .src(st_src), .pt_i(pt_i[s]), .sb_i(sb_y[s]),
      .bit_idx, .row_sel(st_row), .head(st_head[s]), .heads()
    );
    if (s < KEY_SHARES) begin : g_key
      key_array u_key (
        .clk, .shift(key_shift), .src(key_src), .key_i(key_ld[s]), .sb_i(key_sb[s]),
        .rcon_i((s == 0) ? rcon_bit : 1'b0), .addr(key_addr), .row_sel(key_row),
        .head(key_head[s]), .rd(key_rd[s])
      );
    end else begin : g_nokey
      // Unmasked key schedule: this share of the round key is zero.
      assign key_head[s] = 1'b0;
      assign key_rd[s]   = 1'b0;
    end
  end

  // With an unmasked key schedule the key shares are combined while loading
  // and the S-box output shares are combined before entering the key.
  if (KEY_SHARES == SHARES) begin : g_key_masked
    assign key_ld = key_i;
    assign key_sb = sb_y;
  end else begin : g_key_plain
    assign key_ld = SHARES'(^key_i);
    assign key_sb = SHARES'(^sb_y);
  end

  // AddRoundKey sits in front of the S-box and of the ciphertext output.
  assign ct_o = st_head ^ key_head;
  assign sb_x = (sb_src == SB_KEY) ? key_rd : (st_head ^ key_head);

  if (SHARES == 1) begin : g_sbox
    sbox_rs_serial u_sbox (
      .clk, .rst_n, .start(sb_start), .x_i(sb_x[0]), .y_i(sb_y[0]), .y_valid(sb_valid)
    );
  end else begin : g_sbox
    sbox_masked u_sbox (
      .clk, .rst_n, .start(sb_start), .x_i(sb_x), .rnd, .y_i(sb_y), .y_valid(sb_valid)
    );
  end

  // The S-box result is consumed exactly in the cycles it is shifted out.
  property p_sbox_consumed;
    @(posedge clk) disable iff (!rst_n)
      (phase == PH_SUB || phase == PH_KEY) && sb_valid |-> (st_shift != 0 || key_shift != 0);
  endproperty
  a_sbox_consumed: assert property (p_sbox_consumed);

endmodule
