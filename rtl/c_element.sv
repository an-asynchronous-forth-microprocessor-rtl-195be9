// c_element: N-input Muller C-element. The output goes high when all inputs
// are high, low when all inputs are low, and otherwise keeps its last value
// (z = x*y + (x+y)*z' for two inputs). The transistor cell holds its state in
// an inverter latch with a weak feedback inverter; here the state is a
// flip-flop and the output is the combinational majority of the inputs and
// that state, so an agreeing set of inputs reaches the output in the same
// cycle and the held value is updated on the clock edge. Trees of 4-input
// elements build completion detectors, as in the stack and memory datapaths.
// Reset clears the held value (the cell's power-up state is this design's
// choice).
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         z
);
  logic held;

  always_comb z = (&in) | ((|in) & held);

  always_ff @(posedge clk)
    if (!rst_n) held <= 1'b0;
    else        held <= z;
endmodule
