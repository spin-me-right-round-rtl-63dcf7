// tb_sbox_rs_serial: drives all 256 inputs through the bit-serial S-box back
// to back (a new input every 16 cycles, loaded while the previous result is
// shifted out) and compares every result with the reference S-box. Also
// checks that the first result bit appears exactly 16 cycles after the first
// input bit (cycle 17).
module tb_sbox_rs_serial;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, x_i = 0;
  logic y_i, y_valid;
  int checks = 0, failures = 0;

  sbox_rs_serial dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collector: assembles y bits into bytes and compares in order.
  int nout = 0;
  logic [7:0] acc;
  int bitn = 0;
  always @(posedge clk) if (rst_n && y_valid) begin
    acc[bitn] = y_i;
    bitn++;
    if (bitn == 8) begin
      checks++;
      if (acc !== ref_sbox(8'(nout))) begin
        failures++;
        $display("mismatch x=%02x got %02x exp %02x", nout, acc, ref_sbox(8'(nout)));
      end
      nout++;
      bitn = 0;
    end
  end

  int t_start, t_first;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < 256; v++) begin
      for (int c = 0; c < 16; c++) begin
        start <= (c == 0);
        x_i   <= (c < 8) ? v[c] : 1'b0;
        if (v == 0 && c == 0) t_start = $time;
        @(posedge clk);
      end
    end
    start <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 256) begin failures++; $display("only %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Latency: first y_valid cycle counted from the start cycle (cycle 1).
  initial begin
    @(posedge rst_n);
    wait (y_valid === 1'b1);
    t_first = $time;
    checks++;
    if ((t_first - t_start) / 10 != 16) begin
      failures++;
      $display("latency %0d cycles, expected first output in cycle 17", (t_first - t_start) / 10 + 1);
    end
  end
endmodule
