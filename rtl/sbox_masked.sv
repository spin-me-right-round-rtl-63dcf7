// sbox_masked: first-order masked (2-share) AES S-box built from the
// rotational symmetry of the decomposition x^254 = (x^49)^26 in GF(2^8).
//
// Both x^26 and x^49 are cubic power maps, so in the normal basis with
// beta = 205 each output bit of either is the same cubic 8-to-1 function of a
// rotated input (F* for x^26, G* for x^49). Only that one function is masked
// (fg_masked); all the rest is linear and is simply done once per share.
// Schedule, with cycle 1 the cycle `start` is high:
//   cycles 1-7    shift one bit of each share (x_i[s], LSB first) into R1
//   cycle  8      R1 <= p2n(new bit, 7 stored bits), per share
//   cycles 9-16   R1 rotates; G* is evaluated on R1 through the pre-charge
//                 register, one bit per cycle, one cycle of pipeline delay
//   cycles 10-16  the G* bits are shifted into R2
//   cycle  17     R1 <= {last G* bit, R2[7:1]}  (x^49 in normal basis)
//   cycles 18-25  R1 rotates again, now through F*
//   cycles 19-25  the F* bits are shifted into R2
//   cycle  26     R2 <= n2p({last F* bit, R2[7:1]}) (constant 0x63 on share 0)
//   cycles 27-34  result shifted out LSB first on y_i with y_valid high; the
//                 next input may be loaded in the same cycles (start in 27)
// Latency 26 cycles; 6 fresh random bits (rnd) are consumed every cycle.
// The order G* then F*, the 26-cycle schedule, beta = 205 and the pre-charge
// register follow the document; LSB-first order, start/y_valid and the
// internal counters are this design's own.
module sbox_masked
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,    // first input bit pair on x_i this cycle
  input  logic [1:0] x_i,      // serial input, one bit of each share
  input  logic [5:0] rnd,      // fresh randomness, [2:0] part A, [5:3] part B
  output logic [1:0] y_i,      // serial output, one bit of each share
  output logic       y_valid
);
  localparam mat8_t P2N = p2n_matrix(BETA_MASKED);
  localparam mat8_t N2P = n2p_matrix(BETA_MASKED);

  byte_t       r1 [2];
  byte_t       r2 [2];
  logic [4:0]  cnt, phase;
  logic        busy;
  logic [3:0]  ocnt;
  logic [15:0] pre;
  logic [1:0]  f;          // F*/G* output shares
  logic        sel;

  assign phase = start ? 5'd0 : cnt;
  assign sel   = (phase < 5'd17);   // G* in the first pass, F* in the second

  precharge_reg #(.W(16)) u_pre (
    .clk, .clr(clk), .d({r1[1], r1[0]}), .q(pre)
  );

  fg_masked u_fg (
    .clk, .sel, .x0(pre[7:0]), .x1(pre[15:8]), .rA(rnd[2:0]), .rB(rnd[5:3]),
    .y0(f[0]), .y1(f[1])
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1   <= '{default: '0};
      r2   <= '{default: '0};
      cnt  <= '0;
      busy <= 1'b0;
      ocnt <= '0;
    end else begin
      if (ocnt != 0) begin
        for (int s = 0; s < 2; s++) r2[s] <= {1'b0, r2[s][7:1]};
        ocnt <= ocnt - 4'd1;
      end
      if (start || busy) begin
        cnt  <= phase + 5'd1;
        busy <= (phase != 5'd25);
        for (int s = 0; s < 2; s++) begin
          if (phase < 5'd7)        r1[s] <= {x_i[s], r1[s][7:1]};
          else if (phase == 5'd7)  r1[s] <= mat_apply(P2N, {x_i[s], r1[s][7:1]});
          else if (phase == 5'd16) r1[s] <= {f[s], r2[s][7:1]};
          else                     r1[s] <= rot1(r1[s]);
          if ((phase >= 5'd9 && phase <= 5'd15) || (phase >= 5'd18 && phase <= 5'd24))
            r2[s] <= {f[s], r2[s][7:1]};
        end
        if (phase == 5'd25) begin
          r2[0] <= mat_apply(N2P, {f[0], r2[0][7:1]}) ^ AES_AFFINE_C;
          r2[1] <= mat_apply(N2P, {f[1], r2[1][7:1]});
          ocnt  <= 4'd8;
        end
      end
    end
  end

  assign y_i     = {r2[1][0], r2[0][0]};
  assign y_valid = (ocnt != 0);

endmodule
