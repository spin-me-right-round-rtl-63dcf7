// tb_aes_masked: encrypts the FIPS-197 Appendix C.1 vector and random
// blocks, split into random shares, with the masked AES core - once with the
// masked key schedule (dut) and once with the unmasked one (dut_k,
// MASK_KEY = 0), both driven identically - and compares the recombined
// ciphertexts with the reference model. Checks the cycle count of one
// encryption (6384 cycles from the first loaded bit to the last ciphertext
// bit) and that ciphertext share 0 alone is not the ciphertext.
module tb_aes_masked;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] pt_i = 0, key_i = 0, ct_o;
  logic prng_en = 1;
  logic ct_valid, load_req, done;
  int checks = 0, failures = 0;

  aes_masked dut (.*);

  logic [1:0] ct_o_k;
  logic ct_valid_k, load_req_k, done_k;
  aes_masked #(.MASK_KEY(0)) dut_k (
    .clk, .rst_n, .start, .prng_en, .pt_i, .key_i, .ct_o(ct_o_k),
    .ct_valid(ct_valid_k), .load_req(load_req_k), .done(done_k)
  );

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] ct = '0, ct0 = '0, ctk = '0;
    logic [127:0] mp = {$urandom, $urandom, $urandom, $urandom};
    logic [127:0] mk = {$urandom, $urandom, $urandom, $urandom};
    int n = 0, m = 0, cycles = 0;
    @(negedge clk);
    start <= 1;
    @(negedge clk);
    start <= 0;
    // Inputs change on the falling edge and are sampled on the rising edge.
    while (m < 128) begin
      if (load_req) begin
        pt_i  <= {mp[127 - 8*(n/8) - 7 + (n%8)], pt[127 - 8*(n/8) - 7 + (n%8)] ^ mp[127 - 8*(n/8) - 7 + (n%8)]};
        key_i <= {mk[127 - 8*(n/8) - 7 + (n%8)], key[127 - 8*(n/8) - 7 + (n%8)] ^ mk[127 - 8*(n/8) - 7 + (n%8)]};
        n++;
      end
      if (n > 0) cycles++;
      if (ct_valid) begin
        ct[127 - 8*(m/8) - 7 + (m%8)]  = ct_o[0] ^ ct_o[1];
        ct0[127 - 8*(m/8) - 7 + (m%8)] = ct_o[0];
        ctk[127 - 8*(m/8) - 7 + (m%8)] = ct_o_k[0] ^ ct_o_k[1];
        m++;
      end
      @(negedge clk);
    end
    checks++;
    if (ct !== ref_aes128(pt, key)) begin
      failures++;
      $display("ct %032x expected %032x", ct, ref_aes128(pt, key));
    end
    checks++;
    if (ctk !== ref_aes128(pt, key)) begin
      failures++;
      $display("unmasked-key variant: ct %032x expected %032x", ctk, ref_aes128(pt, key));
    end
    checks++;
    if (ct0 === ct) begin
      failures++;
      $display("ciphertext share 0 is unmasked");
    end
    checks++;
    if (cycles != 6384) begin
      failures++;
      $display("encryption took %0d cycles, expected 6384", cycles);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 3; i++)
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
