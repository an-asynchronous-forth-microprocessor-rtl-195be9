// pointer_stack_element: one word of the pointer stack. It stores a data
// word and one pointer bit. The element whose pointer bit is set holds the
// top of the stack and drives it onto the read bus; all others stay idle.
// On a push the pointer passes to the element above (from "below" to this
// one) and that element stores the pushed word; on a pop the pointer passes
// back to the element below. A push and pop in the same cycle replace the
// top word in place.
module pointer_stack_element #(
  parameter int unsigned W     = 16,
  parameter bit          FIRST = 1'b0  // holds the pointer after reset
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic         pop,
  input  logic [W-1:0] din,
  input  logic         ptr_below,  // pointer bit of the element below
  input  logic         ptr_above,  // pointer bit of the element above
  output logic         ptr,        // this element holds the top
  output logic [W-1:0] dout        // data if this element holds the top, else 0
);
  logic [W-1:0] data;

  always_comb dout = ptr ? data : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr  <= FIRST;
      data <= '0;
    end else begin
      if (push && !pop) begin
        ptr <= ptr_below;
        if (ptr_below) data <= din;
      end else if (pop && !push) begin
        ptr <= ptr_above;
      end else if (push && pop && ptr) begin
        data <= din;
      end
    end
  end
endmodule
