// rotsym_top: the rotational-symmetry AES designs side by side.
//
//   u_aes     unprotected bit-serial AES-128 (aes_bitserial, SHARES = 1):
//             S-box of one 8-to-1 function S* evaluated bit by bit, 16-cycle
//             bit-serial S-box shared by round function and key schedule
//   u_aes_m   first-order masked AES-128 (aes_masked): 2 shares, masked
//             S-box via x^254 = (x^49)^26 with pre-charged nonlinear inputs,
//             6 LFSRs for the fresh randomness
//   u_sbox_p  byte-parallel-load rotational S-box (8-cycle latency), the
//             S-box variant for byte-serial AES datapaths
// The three have independent ports and share only clock and reset. Interface
// and timing of each are those of the instantiated modules: for the two AES
// cores, pulse *_start, feed 128 plaintext/key bits (LSB first per byte, AES
// byte order) while *_load_req is high, read 128 ciphertext bits while
// *_ct_valid is high.
module rotsym_top
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // unprotected bit-serial AES
  input  logic       aes_start,
  input  logic       aes_pt_i,
  input  logic       aes_key_i,
  output logic       aes_ct_o,
  output logic       aes_ct_valid,
  output logic       aes_load_req,
  output logic       aes_done,
  // masked bit-serial AES
  input  logic       aesm_start,
  input  logic       aesm_prng_en,
  input  logic [1:0] aesm_pt_i,
  input  logic [1:0] aesm_key_i,
  output logic [1:0] aesm_ct_o,
  output logic       aesm_ct_valid,
  output logic       aesm_load_req,
  output logic       aesm_done,
  // byte-parallel S-box
  input  logic       sbox_start,
  input  byte_t      sbox_x,
  output byte_t      sbox_y,
  output logic       sbox_done
);
  aes_bitserial #(.SHARES(1)) u_aes (
    .clk, .rst_n, .start(aes_start), .pt_i(aes_pt_i), .key_i(aes_key_i), .rnd(6'd0),
    .ct_o(aes_ct_o), .ct_valid(aes_ct_valid), .load_req(aes_load_req), .done(aes_done)
  );

  aes_masked u_aes_m (
    .clk, .rst_n, .start(aesm_start), .prng_en(aesm_prng_en), .pt_i(aesm_pt_i),
    .key_i(aesm_key_i), .ct_o(aesm_ct_o), .ct_valid(aesm_ct_valid),
    .load_req(aesm_load_req), .done(aesm_done)
  );

  sbox_rs_parallel u_sbox_p (
    .clk, .rst_n, .start(sbox_start), .x(sbox_x), .y(sbox_y), .done(sbox_done)
  );
endmodule
