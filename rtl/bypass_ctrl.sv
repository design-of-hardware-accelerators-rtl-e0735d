// bypass_ctrl: pipeline-mode switch of one configurable-pipeline unit.
//
// The unit's mode (mode = 1: pipeline registers bypassed) may only change
// while no operation is inside its pipeline, or results in flight would be lost
// or emerge twice. When the requested mode req differs from the applied mode,
// pending goes high; the issue logic then sends no new operation to the unit.
// Once the unit reports busy = 0, the new mode is applied at the next clock
// edge and pending falls. switches counts the applied mode changes (wraps).
// Reset applies the pipelined mode (mode = 0).
//
// The document has the bypass signal set per unit at run time, together with
// the unit's clock and voltage; this drain-then-switch protocol is this
// design's choice.
module bypass_ctrl #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             busy,
  output logic             mode,
  output logic             pending,
  output logic [CNT_W-1:0] switches
);
  assign pending = req != mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= 1'b0;
      switches <= '0;
    end else if (pending && !busy) begin
      mode     <= req;
      switches <= switches + 1'b1;
    end
  end

  // The mode never changes while the unit holds an operation.
  a_stable_while_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |=> $stable(mode))
    else $error("bypass_ctrl: mode changed while the unit was busy");
endmodule
