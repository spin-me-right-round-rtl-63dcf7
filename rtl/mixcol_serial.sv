// mixcol_serial: bit-serial MixColumns for one share of the AES state.
//
// The four state rows shift together, one bit per cycle, LSB first, so in
// cycle b of a byte the inputs a[i] are bit b of the four bytes of one column.
// Output bit b of row i is bit b of 2*a_i ^ 3*a_(i+1) ^ a_(i+2) ^ a_(i+3),
// rewritten as xtime(a_i ^ a_(i+1)) ^ a_(i+1) ^ a_(i+2) ^ a_(i+3). Bit b of
// xtime(v) is v[b-1] ^ (v[7] & 0x1b[b]); v[b-1] comes from a one-bit delay per
// row, v[7] is read ahead through each row's read port (msb7) in bit 0 and
// kept in a flip-flop for bits 1-7. A whole 4x4 state takes 32 cycles.
// The 32-cycle bit-serial operation with stored most significant bits follows
// the document; the exact circuit (4 MSB and 4 delay flip-flops) is this
// design's own.
module mixcol_serial (
  input  logic       clk,
  input  logic [2:0] bit_idx,  // b: position of the current bit in its byte
  input  logic [3:0] a,        // current bit of rows 0..3
  input  logic [3:0] msb7,     // bit 7 of the current byte of each row (valid when bit_idx == 0)
  output logic [3:0] y         // result bit of rows 0..3
);
  localparam logic [7:0] POLY = 8'h1b;

  logic [3:0] msb_q, prev_q, msb, prev;
  logic [3:0] vm, vp;  // MSB and previous bit of a_i ^ a_(i+1)

  assign msb  = (bit_idx == 3'd0) ? msb7 : msb_q;
  assign prev = (bit_idx == 3'd0) ? 4'b0 : prev_q;

  always_ff @(posedge clk) begin
    msb_q  <= msb;
    prev_q <= a;
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      vm[i] = msb[i]  ^ msb[(i+1)%4];
      vp[i] = prev[i] ^ prev[(i+1)%4];
      y[i]  = vp[i] ^ (vm[i] & POLY[bit_idx]) ^ a[(i+1)%4] ^ a[(i+2)%4] ^ a[(i+3)%4];
    end
  end
endmodule
