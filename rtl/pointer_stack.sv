// pointer_stack: DEPTH x W stack built from pointer_stack_element cells in a
// ring. Exactly one element holds a pointer bit that marks the top of the
// stack; a push or pop only moves that bit to a neighbour and writes one
// element, so no data is shifted between elements. The top word is read
// combinationally (top) through an OR of the element outputs, which are zero
// except at the pointer. Operations take one clock: push writes din above
// the top, pop discards the top, push and pop together replace the top. The
// ring has no full or empty detection: a push beyond DEPTH entries
// overwrites the oldest entry and a pop below the bottom wraps around, which
// the original leaves open. Used for both the data stack and the return
// stack.
module pointer_stack
  import msl16_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = STACK_D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  output logic [W-1:0] top
);
  logic [DEPTH-1:0]        ptr;
  logic [DEPTH-1:0][W-1:0] dout;

  for (genvar g = 0; g < DEPTH; g++) begin : g_el
    pointer_stack_element #(.W(W), .FIRST(g == 0)) u_el (
      .clk      (clk),
      .rst_n    (rst_n),
      .push     (push),
      .pop      (pop),
      .din      (din),
      .ptr_below(ptr[(g + DEPTH - 1) % DEPTH]),
      .ptr_above(ptr[(g + 1) % DEPTH]),
      .ptr      (ptr[g]),
      .dout     (dout[g])
    );
  end

  always_comb begin
    top = '0;
    for (int i = 0; i < DEPTH; i++) top |= dout[i];
  end

  onehot_a: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ptr));
endmodule
