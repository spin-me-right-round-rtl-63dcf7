// state_array: one share of the AES state in four row shift registers, with
// the row input multiplexers and the MixColumns unit.
//
// Row i (srl32) holds the bytes of columns 0..3, LSB first, and shifts when
// shift[i] is high. Its serial input is chosen per row by src[i]: its own
// output (recirculation, used for ShiftRows: row i shifted 8i times), the
// plaintext bit, the S-box output bit or the MixColumns output bit. The read
// port of every row is fixed at bit 7, which gives MixColumns the most
// significant bit of the byte before its bits arrive. `head` is the serial
// output of the row picked by row_sel (the byte under processing); `heads`
// are all four serial outputs.
// The row organisation, per-row shift enables and the input multiplexers
// follow the document's bit-serial architecture; the encodings are this
// design's own.
module state_array
  import aes_bs_pkg::*;
(
  input  logic          clk,
  input  logic [3:0]    shift,
  input  st_src_t [3:0] src,
  input  logic          pt_i,      // plaintext bit
  input  logic          sb_i,      // S-box output bit
  input  logic [2:0]    bit_idx,   // bit position for MixColumns
  input  logic [1:0]    row_sel,
  output logic          head,
  output logic [3:0]    heads
);
  logic [3:0] d, rd7, mc;

  mixcol_serial u_mc (.clk, .bit_idx, .a(heads), .msb7(rd7), .y(mc));

  for (genvar i = 0; i < 4; i++) begin : g_row
    always_comb begin
      unique case (src[i])
        ST_REC:  d[i] = heads[i];
        ST_LOAD: d[i] = pt_i;
        ST_SBOX: d[i] = sb_i;
        ST_MC:   d[i] = mc[i];
      endcase
    end
    srl32 u_row (.clk, .en(shift[i]), .d(d[i]), .addr(5'd7), .head(heads[i]), .rd(rd7[i]));
  end

  assign head = heads[row_sel];
endmodule
