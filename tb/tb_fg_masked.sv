// tb_fg_masked: applies every 8-bit normal-basis input, randomly split into
// two shares, with random fresh bits, for both sel values, and checks that
// the recombined output one cycle later equals coordinate 0 of x^26 (sel = 0)
// or x^49 (sel = 1) in the normal basis with beta = 205, computed by the
// reference model. Also checks the 1-cycle latency by holding one input.
module tb_fg_masked;
  import tb_ref_pkg::*;
  logic clk = 0, sel = 0;
  logic [7:0] x0 = 0, x1 = 0;
  logic [2:0] rA = 0, rB = 0;
  logic y0, y1;
  int checks = 0, failures = 0;

  fg_masked dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [255:0] f_tt, g_tt;
  initial begin
    for (int v = 0; v < 256; v++) begin
      f_tt[v] = ref_power_nb(8'd205, 8'(v), 26) & 1;
      g_tt[v] = ref_power_nb(8'd205, 8'(v), 49) & 1;
    end
    for (int s = 0; s < 2; s++)
      for (int v = 0; v < 256; v++) begin
        logic [7:0] m;
        m = 8'($urandom);
        @(negedge clk);
        sel <= s[0];
        x0  <= 8'(v) ^ m;
        x1  <= m;
        rA  <= 3'($urandom);
        rB  <= 3'($urandom);
        @(negedge clk);   // result registered at the rising edge in between
        checks++;
        if ((y0 ^ y1) !== (s ? g_tt[v] : f_tt[v])) begin
          failures++;
          $display("sel=%0d v=%02x got %b", s, v, y0 ^ y1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
