// arbiter: two-way mutual exclusion element. Each client raises its request,
// waits for its grant, uses the shared resource and lowers the request; the
// grant is withdrawn one cycle later, after which the other client may be
// served. At most one grant is high at any time. The processor has two of
// them: one for the memory port and one for the word program counter, each
// shared by the fetch and execute processes. The original cell is a
// cross-coupled NAND latch followed by a metastability filter; in this
// clocked version the latch is a state register, and a tie between two new
// requests goes to the client that was not served last (the original makes
// an arbitrary choice).
module arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  logic last2;  // client 2 was granted most recently

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g1    <= 1'b0;
      g2    <= 1'b0;
      last2 <= 1'b0;
    end else if (g1) begin
      if (!r1) g1 <= 1'b0;
    end else if (g2) begin
      if (!r2) g2 <= 1'b0;
    end else if (r1 && (!r2 || last2)) begin
      g1    <= 1'b1;
      last2 <= 1'b0;
    end else if (r2) begin
      g2    <= 1'b1;
      last2 <= 1'b1;
    end
  end

  mutex_a: assert property (@(posedge clk) disable iff (!rst_n) !(g1 && g2));
endmodule
