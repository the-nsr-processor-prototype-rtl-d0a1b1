// nsr_step_gate: debug gate on the incoming request of an NSR unit.
//
// Each unit of the original machine had an extra gate on its main incoming
// request, worked by a switch, so the pipeline could be frozen and stepped
// one transfer at a time, and lights that showed a request not yet
// acknowledged, pointing at the unit that stalls a deadlocked machine.
// This module is that gate for a valid/ready channel:
//   hold = 0   the channel passes straight through (combinationally);
//   hold = 1   no transfer happens, except that a one-cycle pulse on step
//              lets exactly one later transfer through.
// led_pending is high while the sender offers a word that is not taken.
// The step pulse is this design's way of stepping a clocked channel.
module nsr_step_gate #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hold,
  input  logic             step,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             led_pending
);

  logic credit;   // one transfer allowed while held
  logic open_gate;

  assign open_gate   = !hold || credit;
  assign out_valid   = in_valid && open_gate;
  assign in_ready    = out_ready && open_gate;
  assign out_data    = in_data;
  assign led_pending = in_valid && !in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         credit <= 1'b0;
    else if (step)                      credit <= 1'b1;
    else if (out_valid && out_ready)    credit <= 1'b0;
  end

endmodule
