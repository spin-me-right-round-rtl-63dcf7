// tb_lfsr_prng: compares the LFSR output bit by bit with an independent model
// of x^31 + x^28 + 1 (a_n = a_(n-31) ^ a_(n-28) on the output sequence),
// checks that it changes only on falling edges, that en = 0 freezes it and
// that the output is roughly balanced.
module tb_lfsr_prng;
  logic clk = 0, rst_n = 0, en = 0;
  logic r;
  int checks = 0, failures = 0;
  localparam logic [30:0] SEED = 31'h1234567;

  lfsr_prng #(.SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [$];
    int ones = 0;
    @(posedge clk);
    @(negedge clk);   // reset applied here
    #1;
    rst_n = 1;
    en = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      hist.push_back(r);
      ones += r;
      @(negedge clk);
      #1;
    end
    // output sequence: s_n = q[30] after n shifts; s_(n+31) = s_(n+3) ^ s_n
    for (int n = 0; n + 31 < hist.size(); n++) begin
      checks++;
      if (hist[n+31] !== (hist[n+3] ^ hist[n])) begin failures++; end
    end
    checks++;
    if (ones < 800 || ones > 1200) begin failures++; $display("unbalanced: %0d ones", ones); end
    // freeze
    en = 0;
    begin
      logic v;
      v = r;
      repeat (10) @(negedge clk);
      #1;
      checks++;
      if (r !== v) begin failures++; $display("en=0 did not freeze"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
