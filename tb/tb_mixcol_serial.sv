// tb_mixcol_serial: feeds random columns bit-serially (LSB first, MSB given
// ahead in bit 0) and compares the 8 collected output bits of every row with
// the byte-level MixColumns of the reference model.
module tb_mixcol_serial;
  import tb_ref_pkg::*;
  logic clk = 0;
  logic [2:0] bit_idx = 0;
  logic [3:0] a = 0, msb7 = 0, y;
  int checks = 0, failures = 0;

  mixcol_serial dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] col [4];
    logic [7:0] got [4];
    logic [7:0] exp [4];
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) col[i] = 8'($urandom);
      if (n == 0) begin col[0] = 8'hdb; col[1] = 8'h13; col[2] = 8'h53; col[3] = 8'h45; end
      for (int i = 0; i < 4; i++)
        exp[i] = ref_xtime(col[i]) ^ ref_xtime(col[(i+1)%4]) ^ col[(i+1)%4] ^ col[(i+2)%4] ^ col[(i+3)%4];
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        bit_idx = 3'(b);
        for (int i = 0; i < 4; i++) begin
          a[i]    = col[i][b];
          msb7[i] = (b == 0) ? col[i][7] : 1'($urandom);
        end
        #1;
        for (int i = 0; i < 4; i++) got[i][b] = y[i];
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++;
          $display("col %02x%02x%02x%02x row %0d got %02x exp %02x", col[0], col[1], col[2], col[3], i, got[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
