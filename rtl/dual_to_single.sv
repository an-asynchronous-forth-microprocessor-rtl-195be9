// dual_to_single: converts a dual-rail word into single-rail bits plus a
// completion strobe. Each bit's value is its true rail; each bit is valid
// when either rail is high (an OR per bit). The per-bit valid signals are
// gathered by a completion tree of 4-input C-elements, so the strobe rises
// only when every bit is valid and falls only when every bit has returned to
// empty. Interface: rail1/rail0 in, d/strobe out; the strobe follows the
// rails in the same cycle (C-element state is updated on the clock edge).
// W must be a power of 4 or is padded up to one: padding inputs copy bit 0's
// valid so they never hold the tree back. The OR per bit, the true rail as
// output and the C-element merge follow the original converter; the clocked
// C-element state and the padding are this design's.
module dual_to_single #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] rail1,
  input  logic [W-1:0] rail0,
  output logic [W-1:0] d,
  output logic         strobe
);
  localparam int unsigned LEVELS = (W <= 1) ? 0 : ($clog2(W) + 1) / 2;
  localparam int unsigned PADDED = 4 ** LEVELS;

  logic [PADDED-1:0] valid;

  always_comb begin
    d = rail1;
    for (int i = 0; i < PADDED; i++)
      valid[i] = (i < W) ? (rail1[i] | rail0[i]) : (rail1[0] | rail0[0]);
  end

  if (LEVELS == 0) begin : g_single
    assign strobe = valid[0];
  end else begin : g_tree
    completion_tree #(.LEVELS(LEVELS)) u_tree (
      .clk(clk), .rst_n(rst_n), .in(valid), .done(strobe)
    );
  end
endmodule
