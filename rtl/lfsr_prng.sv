// lfsr_prng: 31-bit Fibonacci LFSR with feedback polynomial x^31 + x^28 + 1,
// one fresh random bit per cycle.
//
// The register shifts on the falling clock edge, so its transitions fall in
// the other half of the clock period from those of the core it feeds. With
// two taps the sequence has the maximal period 2^31 - 1. Reset loads SEED
// (must be non-zero); `en` low freezes the register, which keeps the output
// constant (fresh randomness switched off).
// Polynomial, register length and falling-edge clocking follow the document;
// the reset, seed parameter and enable are this design's own.
module lfsr_prng #(
  parameter logic [30:0] SEED = 31'h5a5a_1234
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic r
);
  logic [30:0] q;

  always_ff @(negedge clk) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= {q[29:0], q[30] ^ q[27]};
  end

  assign r = q[30];
endmodule
