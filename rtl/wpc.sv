// wpc: the word program counter. It holds the address of the instruction
// word fetched last; the fetch process reads the word at next = wpc + 1 and
// then advances the counter with "inc". The execute process overwrites it
// ("we") for a taken GOTO (with T) and for a CALL (with the call target), and
// reads it for the return address of a CALL. Because the counter is advanced
// after every fetch, execution continues at the word after the one written,
// so branch and call targets are given as the address of the target word
// minus one. Reset clears it, so the first word executed is the one at
// address 1. Access by the two processes is serialised by the program-counter
// arbiter; a write has priority over an increment.
module wpc
  import msl16_pkg::*;
#(
  parameter int unsigned W = WPC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] q,
  output logic [W-1:0] next
);
  always_comb next = q + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n)   q <= '0;
    else if (we)  q <= wdata;
    else if (inc) q <= next;
  end
endmodule
