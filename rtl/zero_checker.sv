// zero_checker: quick-decision zero test of a dual-rail word. "nonzero"
// rises as soon as any bit's true rail is high, without waiting for the other
// bits; "zero" rises only when every bit is valid and every false rail is
// high. "valid" says that all bits have arrived, which the delay-insensitive
// protocol still requires before the word may be released, but a consumer of
// the test result (the branch condition) can proceed on "nonzero" early.
// Combinational.
module zero_checker #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] rail1,
  input  logic [W-1:0] rail0,
  output logic         nonzero,
  output logic         zero,
  output logic         valid
);
  always_comb begin
    nonzero = |rail1;
    zero    = &rail0;
    valid   = &(rail1 | rail0);
  end
endmodule
