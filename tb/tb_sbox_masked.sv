// tb_sbox_masked: sends all 256 inputs, each split into two random shares,
// through the masked S-box back to back (a new input every 26 cycles) with
// fresh random bits every cycle. Recombines the two output shares and
// compares with the reference S-box; checks the 26-cycle latency; checks
// that the output shares are not both constant (the masks reach the output).
module tb_sbox_masked;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] x_i = 0;
  logic [5:0] rnd = 0;
  logic [1:0] y_i;
  logic y_valid;
  int checks = 0, failures = 0;

  sbox_masked dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) rnd <= 6'($urandom);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nout = 0, bitn = 0, share0_ones = 0;
  logic [7:0] acc;
  always @(posedge clk) if (rst_n && y_valid) begin
    acc[bitn] = y_i[0] ^ y_i[1];
    share0_ones += y_i[0];
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

  longint t_start, t_first;
  initial begin
    logic [7:0] m;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < 256; v++) begin
      m = 8'($urandom);
      for (int c = 0; c < 26; c++) begin
        start <= (c == 0);
        x_i   <= (c < 8) ? {m[c], v[c] ^ m[c]} : 2'b00;
        if (v == 0 && c == 0) t_start = $time;
        @(posedge clk);
      end
    end
    start <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (nout != 256) begin failures++; $display("only %0d outputs", nout); end
    checks++;
    if (share0_ones < 256 || share0_ones > 1792) begin
      failures++;
      $display("output share 0 looks unmasked: %0d ones", share0_ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (y_valid === 1'b1);
    t_first = $time;
    checks++;
    if ((t_first - t_start) / 10 != 26) begin
      failures++;
      $display("first output in cycle %0d, expected 27", (t_first - t_start) / 10 + 1);
    end
  end
endmodule
