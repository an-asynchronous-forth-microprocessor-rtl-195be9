// ir_unit: the instruction register and the nibble program counter (LPC).
// It takes a 16-bit word from the fetch unit's holding register when it is
// empty, then offers the execute unit one instruction at a time: the slot
// selected by LPC (slot 0 = bits 15..12), or a CALL when bit 15 of the word
// is set (slot 0 only). When the execute unit completes an instruction
// (e_done), LPC advances; after slot 3, or when the execute unit asks to skip
// the rest of the word (e_skip: LIT in slot 0 or 1, whose operand is the low
// byte, a taken GOTO, a CALL), LPC returns to zero and the register is
// emptied so the next word is loaded. One instruction can complete per clock
// while the word lasts; loading a word takes one clock.
module ir_unit
  import msl16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // from the fetch unit
  input  logic              inst_valid,
  input  logic [DATA_W-1:0] inst_word,
  output logic              inst_ready,
  // to the execute unit
  output logic              e_valid,
  output inst_t             e_inst,
  input  logic              e_done,
  input  logic              e_skip
);
  logic              ir_valid;
  logic [DATA_W-1:0] ir;
  logic [1:0]        lpc;

  always_comb begin
    inst_ready   = !ir_valid;
    e_valid      = ir_valid;
    e_inst.word  = ir;
    e_inst.lpc   = lpc;
    e_inst.call  = (lpc == 2'd0) && ir[DATA_W-1];
    e_inst.op    = opcode_e'(ir[DATA_W-1 - 4*lpc -: 4]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir_valid <= 1'b0;
      ir       <= '0;
      lpc      <= '0;
    end else if (!ir_valid) begin
      if (inst_valid) begin
        ir_valid <= 1'b1;
        ir       <= inst_word;
        lpc      <= '0;
      end
    end else if (e_done) begin
      if (e_skip || lpc == 2'd3) begin
        ir_valid <= 1'b0;
        lpc      <= '0;
      end else begin
        lpc <= lpc + 1'b1;
      end
    end
  end
endmodule
