// srl32: 32-bit shift register with a shift enable, a serial output and an
// addressable read port, the behaviour of a LUT used as a 32-bit shift
// register. One instance holds one row of the AES state or key (4 bytes,
// column 0 in bits [7:0], LSB first).
//
// When en is high, q[31] <= d and every bit moves one place towards bit 0;
// `head` is bit 0 (the serial output) and `rd` is the bit at `addr`. Both
// outputs are combinational. No reset, as in the LUT it models: the contents
// are defined by the first load.
module srl32 #(
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 d,
  input  logic [$clog2(W)-1:0] addr,
  output logic                 head,
  output logic                 rd
);
  logic [W-1:0] q;

  always_ff @(posedge clk) if (en) q <= {d, q[W-1:1]};

  assign head = q[0];
  assign rd   = q[addr];
endmodule
