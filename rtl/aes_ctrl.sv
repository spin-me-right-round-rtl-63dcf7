// aes_ctrl: controller of the bit-serial AES-128 datapath.
//
// An FSM steps through the phases of one encryption and a cycle counter and
// a slot counter derive all row shift enables, multiplexer selects, read
// addresses, S-box starts and the round constant:
//   LOAD  128 cycles  byte n (AES order) bit b in cycle 8n+b into row n%4
//   SUB   17 slots    AddRoundKey + SubBytes: slot p feeds byte p (row p/4,
//                     column p%4, state XOR round key) to the S-box during its
//                     first 8 cycles while the result of slot p-1 is shifted
//                     back into its row; a slot lasts SB_LAT cycles, the last
//                     one (result only) 8 cycles
//   KEY   5 slots     SubWord(RotWord(w3)): slot p<4 reads k(p,3) through the
//                     read port of key row p; the result of slot p-1 is added,
//                     with rcon, into row (p+2)%4
//   ACC   24 cycles   w1..w3 ^= previous column, all key rows
//   SR    24 cycles   ShiftRows: row i shifts in the first 8i cycles
//   MC    32 cycles   MixColumns (rounds 1-9)
//   OUT   128 cycles  ciphertext = state XOR last round key, byte n bit b in
//                     cycle 8n+b (ct_valid high)
// SUB..MC repeat for rounds 1..10. One encryption takes
// 128 + 10*(17-slot SUB + KEY + 24 + 24) + 9*32 + 128 cycles; with SB_LAT = 16
// that is 4384, with SB_LAT = 26 it is 6384.
// The phases, their operations and the sharing of one S-box between round
// function and key schedule follow the document; the order of the phases, the
// slot scheme and all cycle counts are this design's own.
module aes_ctrl
  import aes_bs_pkg::*;
#(
  parameter int unsigned SB_LAT = 16   // S-box latency: 16 unprotected, 26 masked
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,       // begin loading a new block next cycle
  output phase_t         phase,
  output logic [3:0]     st_shift,
  output st_src_t [3:0]  st_src,
  output logic [1:0]     st_row,
  output logic [3:0]     key_shift,
  output key_src_t [3:0] key_src,
  output logic [1:0]     key_row,
  output logic [4:0]     key_addr,
  output logic           rcon_bit,
  output logic [2:0]     bit_idx,
  output logic           sb_start,
  output sb_src_t        sb_src,
  output logic           load_req,    // plaintext/key bit expected this cycle
  output logic           ct_valid,    // ciphertext bit valid this cycle
  output logic           done,        // last ciphertext bit this cycle
  output logic [3:0]     round        // current round 1..10
);
  logic [7:0] cnt;    // cycle inside a phase or inside a slot
  logic [4:0] slot;
  logic [7:0] rcon;
  logic       last_cyc;
  logic       sh;     // shift cycle inside a slot

  // End-of-phase / end-of-slot detection.
  always_comb begin
    last_cyc = 1'b0;
    unique case (phase)
      PH_LOAD, PH_OUT: last_cyc = (cnt == 8'd127);
      PH_SUB:          last_cyc = (slot == 5'd16) ? (cnt == 8'd7) : (cnt == 8'(SB_LAT - 1));
      PH_KEY:          last_cyc = (slot == 5'd4)  ? (cnt == 8'd7) : (cnt == 8'(SB_LAT - 1));
      PH_ACC, PH_SR:   last_cyc = (cnt == 8'd23);
      PH_MC:           last_cyc = (cnt == 8'd31);
      default:         last_cyc = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      slot  <= '0;
      rcon  <= 8'h01;
      round <= 4'd1;
    end else begin
      cnt <= cnt + 8'd1;
      unique case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (start) begin
            phase <= PH_LOAD;
            rcon  <= 8'h01;
            round <= 4'd1;
          end
        end
        PH_LOAD: if (last_cyc) begin phase <= PH_SUB; cnt <= '0; slot <= '0; end
        PH_SUB: if (last_cyc) begin
          cnt <= '0;
          if (slot == 5'd16) begin phase <= PH_KEY; slot <= '0; end
          else slot <= slot + 5'd1;
        end
        PH_KEY: if (last_cyc) begin
          cnt <= '0;
          if (slot == 5'd4) begin phase <= PH_ACC; slot <= '0; end
          else slot <= slot + 5'd1;
        end
        PH_ACC: if (last_cyc) begin
          phase <= PH_SR;
          cnt   <= '0;
          rcon  <= {rcon[6:0], 1'b0} ^ (rcon[7] ? 8'h1b : 8'h00);
        end
        PH_SR: if (last_cyc) begin
          cnt <= '0;
          if (round == 4'd10) phase <= PH_OUT;
          else                phase <= PH_MC;
        end
        PH_MC: if (last_cyc) begin
          cnt   <= '0;
          phase <= PH_SUB;
          round <= round + 4'd1;
        end
        PH_OUT: if (last_cyc) begin phase <= PH_IDLE; cnt <= '0; end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign sh      = (cnt < 8'd8);
  assign bit_idx = cnt[2:0];

  always_comb begin
    st_shift  = '0;
    st_src    = {4{ST_REC}};
    st_row    = '0;
    key_shift = '0;
    key_src   = {4{KEY_REC}};
    key_row   = '0;
    key_addr  = 5'd24;
    rcon_bit  = 1'b0;
    sb_start  = 1'b0;
    sb_src    = SB_STATE;
    load_req  = 1'b0;
    ct_valid  = 1'b0;
    done      = 1'b0;
    unique case (phase)
      PH_LOAD: begin
        load_req                 = 1'b1;
        st_shift[cnt[4:3]]       = 1'b1;
        st_src[cnt[4:3]]         = ST_LOAD;
        key_shift[cnt[4:3]]      = 1'b1;
        key_src[cnt[4:3]]        = KEY_LOAD;
      end
      PH_SUB: begin
        if (slot < 5'd16) begin
          st_row              = slot[3:2];
          key_row             = slot[3:2];
          st_shift[slot[3:2]] = sh;
          key_shift[slot[3:2]] = sh;
          st_src[slot[3:2]]   = (slot[1:0] == 2'd0) ? ST_REC : ST_SBOX;
          sb_start            = (cnt == 8'd0);
        end
        if (slot != 5'd0 && slot[1:0] == 2'd0) begin
          st_shift[2'(slot[3:2] - 2'd1)] = sh;
          st_src[2'(slot[3:2] - 2'd1)]   = ST_SBOX;
        end
      end
      PH_KEY: begin
        if (slot < 5'd4) begin
          key_row  = slot[1:0];
          // Row 3 has already been rotated by one byte in slot 1.
          key_addr = ((slot == 5'd3) ? 5'd16 : 5'd24) + 5'(cnt[2:0]);
          sb_src   = SB_KEY;
          sb_start = (cnt == 8'd0);
        end
        if (slot != 5'd0) begin
          key_shift[2'(slot[1:0] + 2'd2)] = sh;
          key_src[2'(slot[1:0] + 2'd2)]   = KEY_SBOX;
          rcon_bit = (2'(slot[1:0] + 2'd2) == 2'd0) && sh && rcon[cnt[2:0]];
        end
      end
      PH_ACC: begin
        key_shift = 4'hf;
        key_src   = {4{KEY_ACC}};
        key_addr  = 5'd24;
      end
      PH_SR: begin
        for (int i = 1; i < 4; i++) st_shift[i] = (cnt < 8'(8 * i));
      end
      PH_MC: begin
        st_shift = 4'hf;
        st_src   = {4{ST_MC}};
      end
      PH_OUT: begin
        ct_valid            = 1'b1;
        done                = (cnt == 8'd127);
        st_row              = cnt[4:3];
        key_row             = cnt[4:3];
        st_shift[cnt[4:3]]  = 1'b1;
        key_shift[cnt[4:3]] = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
