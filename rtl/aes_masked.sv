// aes_masked: first-order masked AES-128 encryption, the 2-share bit-serial
// core together with the generator of its fresh randomness.
//
// aes_bitserial with SHARES = 2 holds plaintext, key and state in two Boolean
// shares and uses the masked rotational-symmetry S-box, which needs 6 fresh
// random bits in every cycle. Each of those bits comes from its own 31-bit
// LFSR (x^31 + x^28 + 1) clocked on the falling edge, seeded differently.
// The caller supplies the plaintext and key already split into two shares and
// receives the ciphertext in two shares (XOR them to unmask).
//
// Interface and timing as aes_bitserial: start pulse, 128 load cycles
// (load_req), ciphertext shares on ct_o while ct_valid is high, 6384 cycles
// per block. prng_en = 0 freezes the LFSRs (no fresh randomness), as used for
// leakage evaluation. The LFSR construction follows the document; the seeds
// and the enable are this design's own. MASK_KEY = 0 gives the cheaper
// variant with an unmasked key schedule; the interface stays the same (the
// key shares are combined on loading).
module aes_masked #(
  parameter bit MASK_KEY = 1   // 1: key schedule masked as well; 0: key in one share
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       prng_en,
  input  logic [1:0] pt_i,    // plaintext bit, shares 0 and 1
  input  logic [1:0] key_i,   // key bit, shares 0 and 1
  output logic [1:0] ct_o,    // ciphertext bit, shares 0 and 1
  output logic       ct_valid,
  output logic       load_req,
  output logic       done
);
  localparam logic [30:0] SEEDS [6] = '{31'h1d2c3b4a, 31'h0badcafe, 31'h13579bdf,
                                         31'h2468ace0, 31'h5eed1234, 31'h7fedcba9};
  logic [5:0] rnd;

  for (genvar i = 0; i < 6; i++) begin : g_prng
    lfsr_prng #(.SEED(SEEDS[i])) u_lfsr (.clk, .rst_n, .en(prng_en), .r(rnd[i]));
  end

  aes_bitserial #(.SHARES(2), .MASK_KEY(MASK_KEY)) u_core (
    .clk, .rst_n, .start, .pt_i, .key_i, .rnd, .ct_o, .ct_valid, .load_req, .done
  );
endmodule
