// bypass_reg: configurable pipeline register.
//
// A pipeline flip-flop with a 2:1 multiplexer on its output. With bypass = 0
// the output is the registered input (one cycle of latency); with bypass = 1
// the input goes straight to the output and the stage is combinational. The
// flip-flop keeps running on clk, which the unit around it gates off while
// bypass is set, so a bypassed register holds its last value and toggles
// nothing. This structure is the one the document describes for every pipeline
// register of the FP adder and multiplier. The asynchronous active-low reset
// (to zero) is this design's choice; it clears valid bits even while the clock
// is gated.
//
// Timing: q = bypass ? d : d delayed by one rising edge of clk.
module bypass_reg #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bypass,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ff <= '0;
    else        ff <= d;
  end

  assign q = bypass ? d : ff;
endmodule
