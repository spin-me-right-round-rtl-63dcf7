// tb_sbox_rs_parallel: loads all 256 bytes into the byte-parallel S-box and
// checks y against the reference S-box in the cycle done rises, and that done
// rises exactly 8 cycles after the load cycle.
module tb_sbox_rs_parallel;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] x = 0, y;
  logic done;
  int checks = 0, failures = 0;

  sbox_rs_parallel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      int lat;
      lat = 0;
      @(negedge clk);
      start = 1;
      x     = 8'(v);
      @(negedge clk);
      start = 0;
      x     = 8'($urandom);   // the input is only needed in the load cycle
      lat   = 1;
      while (!done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 8) begin failures++; $display("v=%02x latency %0d", v, lat); end
      checks++;
      if (y !== ref_sbox(8'(v))) begin
        failures++;
        $display("v=%02x got %02x exp %02x", v, y, ref_sbox(8'(v)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
