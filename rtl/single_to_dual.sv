// single_to_dual: converts a bundled-data word (one wire per bit plus a
// strobe that says the bits are valid) into dual-rail code. For each bit the
// true rail is bit AND strobe and the false rail is NOT bit AND strobe, so
// both rails are low (empty) while the strobe is low and exactly one rail per
// bit is high while it is high. Purely combinational; used where bundled data
// from outside the core, such as memory read data, enters the dual-rail
// datapath. The two AND gates per bit are those of the original converter;
// using it on the memory read path is this design's arrangement.
module single_to_dual #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] d,
  input  logic         strobe,
  output logic [W-1:0] rail1,  // true rails
  output logic [W-1:0] rail0   // false rails
);
  always_comb begin
    rail1 = d & {W{strobe}};
    rail0 = ~d & {W{strobe}};
  end
endmodule
