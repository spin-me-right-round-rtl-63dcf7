// tb_srl32: shifts random bits into the 32-bit shift register with a random
// enable, keeps a model of its contents, and checks the serial output and the
// read port at random addresses every cycle.
module tb_srl32;
  logic clk = 0, en = 0, d = 0;
  logic [4:0] addr = 0;
  logic head, rd;
  logic [31:0] model;
  int checks = 0, failures = 0;

  srl32 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      en = 1; d = 1'($urandom);
      model = {d, model[31:1]};
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (head !== model[0] || rd !== model[addr]) begin
        failures++;
        $display("head %b rd[%0d] %b exp %b %b", head, addr, rd, model[0], model[addr]);
      end
      en   = 1'($urandom);
      d    = 1'($urandom);
      addr = 5'($urandom);
      if (en) model = {d, model[31:1]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
