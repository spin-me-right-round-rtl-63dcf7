// tb_aes_bitserial: encrypts the FIPS-197 Appendix C.1 vector and random
// blocks with the unprotected bit-serial AES core and compares with the
// reference model. Checks the cycle count of one encryption (4384 cycles from
// the first loaded bit to the last ciphertext bit).
module tb_aes_bitserial;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [0:0] pt_i = 0, key_i = 0, ct_o;
  logic [5:0] rnd = 0;
  logic ct_valid, load_req, done;
  int checks = 0, failures = 0;

  aes_bitserial dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] ct = '0;
    int n = 0, m = 0, cycles = 0;
    @(negedge clk);
    start <= 1;
    @(negedge clk);
    start <= 0;
    // Inputs change on the falling edge and are sampled on the rising edge.
    while (m < 128) begin
      if (load_req) begin
        pt_i  <= pt[127 - 8*(n/8) - 7 + (n%8)];
        key_i <= key[127 - 8*(n/8) - 7 + (n%8)];
        n++;
      end
      if (n > 0) cycles++;
      if (ct_valid) begin
        ct[127 - 8*(m/8) - 7 + (m%8)] = ct_o[0];
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
    if (cycles != 4384) begin
      failures++;
      $display("encryption took %0d cycles, expected 4384", cycles);
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
