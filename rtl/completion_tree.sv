// completion_tree: a tree of 4-input C-elements over 4**LEVELS inputs. The
// output rises when all inputs are high and falls when all are low, as used
// to detect that a whole dual-rail word has become valid or empty. A single
// wide C-element would be too slow in silicon, so the original merges
// completion signals four at a time; this module keeps that shape.
//
// The tree is stored heap-style in one vector: node i has children
// 4i+1 .. 4i+4, the last 4**LEVELS nodes are the inputs, and node 0 is the
// output. Each C-element holds its state in a register (see c_element), so
// a change at the inputs reaches "done" combinationally but the held value
// of every level is updated on the clock.
module completion_tree #(
  parameter int unsigned LEVELS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [4**LEVELS-1:0] in,
  output logic                 done
);
  localparam int unsigned INNER = (4 ** LEVELS - 1) / 3;  // C-elements
  localparam int unsigned NODES = INNER + 4 ** LEVELS;

  logic [NODES-1:0] node;

  assign node[NODES-1:INNER] = in;

  for (genvar i = 0; i < INNER; i++) begin : g_c
    c_element #(.N(4)) u_c (
      .clk(clk), .rst_n(rst_n), .in(node[4*i+1 +: 4]), .z(node[i])
    );
  end

  assign done = node[0];
endmodule
