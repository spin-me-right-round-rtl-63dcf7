// sbox_rs_parallel: AES S-box with byte-parallel load, evaluated one output
// bit per cycle through rotational symmetry.
//
// On the cycle `start` is high the input byte x is converted to the normal
// basis (p2n) and written into the 8-bit register R1. In each of the next 8
// cycles the single 8-to-1 function S* looks at R1 and produces one
// normal-basis output bit, while R1 rotates by one position (a squaring of the
// field element, so the next bit of the power map appears at S*). The first 7
// bits are shifted into the 7-bit register R2. In the 8th cycle the last S*
// bit bypasses R2 and, together with R2, goes through n2p (back to polynomial
// basis merged with the AES affine map), so y is valid combinationally in that
// cycle, flagged by `done`. y holds the result until the next start.
//
// Timing: start in cycle 0, done and y valid in cycle 8. A start while busy
// restarts the evaluation. Normal basis beta = 145, S* for x^254 and the
// 8-cycle schedule follow the document; the start/done handshake, the
// internal 3-bit counter and the synchronous active-low reset are this
// design's own choices.
module sbox_rs_parallel
  import rs_pkg::*;
#(
  parameter byte_t BETA = BETA_PARALLEL
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,   // load x this cycle
  input  byte_t x,       // S-box input (polynomial basis)
  output byte_t y,       // S-box output, valid while done is high
  output logic  done     // high in the 8th cycle after start
);
  localparam mat8_t       P2N = p2n_matrix(BETA);
  localparam mat8_t       N2P = n2p_matrix(BETA);
  localparam logic [255:0] SSTAR = sstar_table(BETA, 254);

  byte_t      r1;
  logic [6:0] r2;
  logic [2:0] cnt;
  logic       busy;
  logic       s;

  assign s = SSTAR[r1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1   <= '0;
      r2   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (start) begin
      r1   <= mat_apply(P2N, x);
      cnt  <= '0;
      busy <= 1'b1;
    end else if (busy) begin
      r1  <= rot1(r1);
      cnt <= cnt + 3'd1;
      if (cnt != 3'd7) r2 <= {s, r2[6:1]};
      if (cnt == 3'd7) busy <= 1'b0;
    end
  end

  assign done = busy && (cnt == 3'd7);
  // The register bypass: the last S* bit joins R2 without being stored.
  assign y = mat_apply(N2P, {s, r2}) ^ AES_AFFINE_C;

endmodule
