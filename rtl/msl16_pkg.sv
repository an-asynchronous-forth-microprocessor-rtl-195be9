// msl16_pkg: shared widths and the instruction encoding of the MSL16 stack
// machine. Each 16-bit memory word is either a CALL (bit 15 set, bits 14..0
// the target) or four 4-bit instruction slots, slot 0 in bits 15..12. Slot 0
// can therefore only hold opcodes 0..7. The opcode numbers follow the
// published MSL16 instruction table.
package msl16_pkg;

  localparam int unsigned DATA_W  = 16;  // data, instruction and address width
  localparam int unsigned WPC_W   = 14;  // word program counter width
  localparam int unsigned STACK_D = 32;  // data and return stack depth

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_AND  = 4'd1,
    OP_XOR  = 4'd2,
    OP_ADD  = 4'd3,
    OP_ZEQ  = 4'd4,   // 0=
    OP_LIT  = 4'd5,
    OP_SHR  = 4'd6,   // 2/
    OP_SUB  = 4'd7,   // DS - T
    OP_DUP  = 4'd8,
    OP_DROP = 4'd9,
    OP_GOTO = 4'd10,
    OP_RTO  = 4'd11,  // R>
    OP_TOR  = 4'd12,  // >R
    OP_AT   = 4'd13,  // @
    OP_ST   = 4'd14,  // !
    OP_SWAP = 4'd15
  } opcode_e;

  // ALU function select carried on the ALU channel
  typedef enum logic [2:0] {
    ALU_AND = 3'd0,
    ALU_XOR = 3'd1,
    ALU_ADD = 3'd2,
    ALU_SUB = 3'd3,
    ALU_SHR = 3'd4,
    ALU_ZEQ = 3'd5
  } alu_op_e;

  // One instruction as handed from the instruction register to the
  // execution unit.
  typedef struct packed {
    logic          call;   // word is a CALL (slot 0, bit 15 set)
    opcode_e       op;     // opcode of the selected slot
    logic [1:0]    lpc;    // slot number (nibble PC)
    logic [DATA_W-1:0] word; // the whole instruction word (LIT operand, CALL target)
  } inst_t;

endpackage
