// precharge_reg: pre-charge register in front of the masked F*/G* block.
//
// While the clock is high the register is held cleared (asynchronous clear
// driven by the clock itself), so the nonlinear block sees all-zero inputs.
// On the falling edge it captures d, which by then has settled after the
// rising-edge update of the rotating register feeding it. The nonlinear block
// therefore never sees a direct transition from one rotated input to the next:
// every change goes through the all-zero value, which keeps a share of one bit
// and the other share of the same bit from meeting in one transition.
//
// Timing: q = 0 during the high phase, q = d (sampled at the falling edge)
// during the low phase; a rising-edge register behind it still samples the
// low-phase value. The clear is a separate port so that the clock can drive
// it (clr = clk) as a plain asynchronous clear. Behaviour and edges follow the
// document; the width parameter is this design's own.
module precharge_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,   // falling edge captures d
  input  logic         clr,   // asynchronous clear, tied to the clock
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(negedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
