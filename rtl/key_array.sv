// key_array: one share of the AES-128 key state in four row shift registers
// with the key-schedule input logic of each row.
//
// Row i (srl32) holds key bytes k(i,0..3), LSB first, and shifts when
// shift[i] is high. Its serial input, chosen by src[i], is its own output
// (recirculation), the key input bit, its own output XOR the S-box output XOR
// the round-constant bit (the new first column: w0 ^ SubWord(RotWord(w3)) ^
// rcon), or its own output XOR its read-port bit. With the read address at 24
// the read port returns the bit shifted in 8 cycles earlier, i.e. the same
// bit of the new byte of the previous column, so 24 shifts turn
// (w1, w2, w3) into (w1^w0', w2^w1', w3^w2'). The read port of the row picked
// by row_sel also feeds key bytes to the S-box (rd), and `head` is the round
// key bit of that row for AddRoundKey.
// The row organisation and the use of the read port follow the document's
// bit-serial key schedule; the exact encodings are this design's own.
module key_array
  import aes_bs_pkg::*;
(
  input  logic           clk,
  input  logic [3:0]     shift,
  input  key_src_t [3:0] src,
  input  logic           key_i,    // key bit
  input  logic           sb_i,     // S-box output bit
  input  logic           rcon_i,   // round-constant bit (row 0, share 0 only)
  input  logic [4:0]     addr,     // read address of all rows
  input  logic [1:0]     row_sel,
  output logic           head,
  output logic           rd
);
  logic [3:0] d, heads, rds;

  for (genvar i = 0; i < 4; i++) begin : g_row
    always_comb begin
      unique case (src[i])
        KEY_REC:  d[i] = heads[i];
        KEY_LOAD: d[i] = key_i;
        KEY_SBOX: d[i] = heads[i] ^ sb_i ^ rcon_i;
        KEY_ACC:  d[i] = heads[i] ^ rds[i];
      endcase
    end
    srl32 u_row (.clk, .en(shift[i]), .d(d[i]), .addr, .head(heads[i]), .rd(rds[i]));
  end

  assign head = heads[row_sel];
  assign rd   = rds[row_sel];
endmodule
