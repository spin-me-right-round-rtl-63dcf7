// tb_key_array: loads a random key, then runs one key-schedule round with the
// control sequence the controller uses (S-box results - here computed by the
// reference S-box and fed bit-serially - added with rcon into the first
// column, then 24 accumulate cycles) and compares the rows with the reference
// AES-128 key expansion; also checks the S-box read port addresses.
module tb_key_array;
  import tb_ref_pkg::*;
  import aes_bs_pkg::*;
  logic clk = 0;
  logic [3:0] shift = 0;
  key_src_t [3:0] src = {4{KEY_REC}};
  logic key_i = 0, sb_i = 0, rcon_i = 0;
  logic [4:0] addr = 24;
  logic [1:0] row_sel = 0;
  logic head, rd;
  int checks = 0, failures = 0;

  key_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] k [16];
  logic [7:0] rc = 8'h01;

  initial begin
    for (int n = 0; n < 16; n++) k[n] = 8'($urandom);
    for (int n = 0; n < 16; n++)
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        shift = 4'(1 << (n % 4)); src = {4{KEY_LOAD}}; key_i = k[n][b];
      end
    @(negedge clk); shift = 0;
    for (int round = 1; round <= 3; round++) begin
      logic [7:0] sb [4];
      logic [7:0] got;
      // read k(j,3) through the read port, as the controller's key slots do
      for (int p = 0; p < 4; p++) begin
        for (int b = 0; b < 8; b++) begin
          @(negedge clk);
          shift = 0; row_sel = 2'(p); addr = 5'(((p == 3) ? 16 : 24) + b);
          #1;
          got[b] = rd;
        end
        checks++;
        if (got !== k[4*3 + p]) begin failures++; $display("read port row %0d got %02x exp %02x", p, got, k[12+p]); end
        sb[p] = ref_sbox(got);
        // slot p+1 adds S(k(p,3)) into row (p+3)%4
        for (int b = 0; b < 8; b++) begin
          @(negedge clk);
          shift = 4'(1 << ((p + 3) % 4)); src = {4{KEY_SBOX}};
          sb_i = sb[p][b]; rcon_i = (((p + 3) % 4) == 0) ? rc[b] : 1'b0;
        end
        @(negedge clk); shift = 0; rcon_i = 0;
      end
      for (int c = 0; c < 24; c++) begin
        @(negedge clk);
        shift = 4'hf; src = {4{KEY_ACC}}; addr = 24;
      end
      @(negedge clk); shift = 0;
      // reference expansion
      k[0] ^= ref_sbox(k[13]) ^ rc; k[1] ^= ref_sbox(k[14]);
      k[2] ^= ref_sbox(k[15]);      k[3] ^= ref_sbox(k[12]);
      for (int n = 4; n < 16; n++) k[n] ^= k[n-4];
      rc = ref_xtime(rc);
      // compare every byte via the head of each row (recirculate 32 cycles)
      for (int r = 0; r < 4; r++) begin
        logic [31:0] row;
        for (int b = 0; b < 32; b++) begin
          @(negedge clk);
          row_sel = 2'(r); shift = 4'(1 << r); src = {4{KEY_REC}};
          #1;
          row[b] = head;
        end
        @(negedge clk); shift = 0;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (row[8*c +: 8] !== k[4*c + r]) begin
            failures++;
            $display("round %0d k(%0d,%0d) got %02x exp %02x", round, r, c, row[8*c +: 8], k[4*c+r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
