// tb_precharge_reg: checks that the pre-charge register reads zero during
// the whole high phase of the clock, holds the value captured at the falling
// edge during the low phase, and that a rising-edge register behind it
// samples the low-phase value.
module tb_precharge_reg;
  logic clk = 0;
  logic [15:0] d = 0, q, behind;
  int checks = 0, failures = 0;

  precharge_reg #(.W(16)) dut (.clk, .clr(clk), .d, .q);

  always #5 clk = ~clk;
  always_ff @(posedge clk) behind <= q;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, prev;
    prev = 0;
    for (int i = 0; i < 100; i++) begin
      v = 16'($urandom) | 16'h1;
      @(posedge clk);
      #1;
      checks++;
      if (q !== 16'h0) begin failures++; $display("q=%h while clock high", q); end
      if (i > 0) begin
        checks++;
        if (behind !== prev) begin failures++; $display("rising edge saw %h exp %h", behind, prev); end
      end
      d = v;
      #2;
      checks++;
      if (q !== 16'h0) begin failures++; $display("q follows d while clock high"); end
      @(negedge clk);
      #1;
      d = ~v;          // changes after the falling edge must not pass
      #1;
      checks++;
      if (q !== v) begin failures++; $display("q=%h exp %h in low phase", q, v); end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
