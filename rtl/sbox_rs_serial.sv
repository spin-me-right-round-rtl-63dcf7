// sbox_rs_serial: AES S-box with bit-serial input and output, evaluated one
// output bit per cycle through rotational symmetry.
//
// The input byte arrives LSB first on x_i, one bit per cycle, the first bit in
// the cycle `start` is high (cycle 1). Cycles 1-7 shift the bits into R1; in
// cycle 8 the newest bit and the 7 stored bits go through p2n (polynomial to
// normal basis) and the result is written back into R1 in parallel. In cycles
// 9-16 R1 rotates and the 8-to-1 function S* produces one normal-basis bit of
// the inverse per cycle; the first 7 are shifted into R2. In cycle 16 the last
// S* bit and R2 go through n2p (normal to polynomial basis plus AES affine map)
// and the S-box output is written into R2 in parallel. In cycles 17-24 the
// result leaves LSB first on y_i with y_valid high; a new input may be shifted
// in during those same cycles (start in cycle 17).
//
// Latency: 16 cycles from the first input bit to the parallel result, output
// bit k in cycle 17+k. Normal basis beta = 133 and the schedule above follow
// the document; LSB-first bit order, start/y_valid and the internal counters
// are this design's own choices.
module sbox_rs_serial
  import rs_pkg::*;
#(
  parameter byte_t BETA = BETA_SERIAL
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,    // first input bit on x_i this cycle
  input  logic x_i,      // serial S-box input, LSB first
  output logic y_i,      // serial S-box output, LSB first
  output logic y_valid   // y_i carries a result bit
);
  localparam mat8_t        P2N   = p2n_matrix(BETA);
  localparam mat8_t        N2P   = n2p_matrix(BETA);
  localparam logic [255:0] SSTAR = sstar_table(BETA, 254);

  byte_t      r1, r2;
  logic [3:0] cnt;     // position inside the 16-cycle evaluation
  logic       busy;
  logic [3:0] ocnt;    // output bits still to shift out
  logic       s;
  logic [3:0] phase;

  assign s     = SSTAR[r1];
  assign phase = start ? 4'd0 : cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1   <= '0;
      r2   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      ocnt <= '0;
    end else begin
      if (ocnt != 0) begin
        r2   <= {1'b0, r2[7:1]};
        ocnt <= ocnt - 4'd1;
      end
      if (start || busy) begin
        cnt  <= phase + 4'd1;
        busy <= (phase != 4'd15);
        if (phase < 4'd7)       r1 <= {x_i, r1[7:1]};
        else if (phase == 4'd7) r1 <= mat_apply(P2N, {x_i, r1[7:1]});
        else                    r1 <= rot1(r1);
        if (phase >= 4'd8 && phase < 4'd15) r2 <= {s, r2[7:1]};
        if (phase == 4'd15) begin
          r2   <= mat_apply(N2P, {s, r2[7:1]}) ^ AES_AFFINE_C;
          ocnt <= 4'd8;
        end
      end
    end
  end

  assign y_i     = r2[0];
  assign y_valid = (ocnt != 0);

endmodule
