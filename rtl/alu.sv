// alu: the arithmetic and logic unit. Operands are the top-of-stack register
// T (a) and the top of the data stack (b). Functions: AND, XOR, a+b, b-a
// (computed as b + ~a + 1), arithmetic shift right of a (2/), and a=0
// (all ones when a is zero, else zero).
//
// The adder is a plain ripple-carry chain of 16 full adders whose completion
// is sensed rather than timed: a carry into a bit is known at once where the
// bit below kills (0,0) or generates (1,1), and otherwise waits for the carry
// below it. The unit resolves CARRY_STEPS carry positions per clock and
// reports completion when every carry is known, so an addition takes
// max(1, ceil(L / CARRY_STEPS)) cycles, where L is the longest run of
// propagate bits (a != b) among bits 0..14. 1-1 (1 + 0xFFFE + 1) is the
// worst case, L = 15. Logic functions, shift and the zero test take one
// cycle. The zero test uses the quick-decision zero checker on the dual-rail
// form of a.
//
// Handshake: when idle (busy low) a request is accepted with its operands;
// "done" is a one-cycle pulse with the result on y, and the unit is idle
// again in the cycle after. CARRY_STEPS per cycle is this design's choice;
// the ripple adder and data-dependent completion follow the original.
module alu
  import msl16_pkg::*;
#(
  parameter int unsigned W           = DATA_W,
  parameter int unsigned CARRY_STEPS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] y
);
  alu_op_e      op_q;
  logic [W-1:0] a_q, b_q;        // b_q holds the already inverted a for SUB
  logic [W-1:0] ck_q, cv_q;      // carry into bit i known / value
  logic [W-1:0] ck_n, cv_n;
  logic         is_arith;

  // dual-rail view of a for the zero checker
  logic [W-1:0] a_r1, a_r0;
  logic         a_nz, a_z, a_valid;
  single_to_dual #(.W(W)) u_s2d (.d(a_q), .strobe(busy), .rail1(a_r1), .rail0(a_r0));
  zero_checker   #(.W(W)) u_zc  (.rail1(a_r1), .rail0(a_r0), .nonzero(a_nz), .zero(a_z), .valid(a_valid));

  assign is_arith = (op_q == ALU_ADD) || (op_q == ALU_SUB);

  // resolve CARRY_STEPS more carry positions
  always_comb begin
    ck_n = ck_q;
    cv_n = cv_q;
    for (int s = 0; s < CARRY_STEPS; s++)
      for (int i = W - 1; i >= 1; i--)
        if (!ck_n[i] && ck_n[i-1]) begin
          ck_n[i] = 1'b1;
          cv_n[i] = cv_n[i-1];
        end
  end

  always_comb begin
    done = 1'b0;
    y    = '0;
    if (busy) begin
      unique case (op_q)
        ALU_AND: begin done = 1'b1; y = a_q & b_q; end
        ALU_XOR: begin done = 1'b1; y = a_q ^ b_q; end
        ALU_SHR: begin done = 1'b1; y = {a_q[W-1], a_q[W-1:1]}; end
        ALU_ZEQ: begin done = a_valid; y = (a_z && !a_nz) ? '1 : '0; end
        ALU_ADD, ALU_SUB: begin done = &ck_n; y = a_q ^ b_q ^ cv_n; end
        default: begin done = 1'b1; y = '0; end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      op_q <= ALU_AND;
      a_q  <= '0;
      b_q  <= '0;
      ck_q <= '0;
      cv_q <= '0;
    end else if (!busy) begin
      if (req) begin
        logic [W-1:0] x, z;
        logic         cin;
        busy <= 1'b1;
        op_q <= op;
        // SUB: b - a = b + ~a + 1; the adder sees x = b, z = ~a
        x    = b;
        z    = (op == ALU_SUB) ? ~a : a;
        cin  = (op == ALU_SUB);
        if (op == ALU_ADD || op == ALU_SUB) begin
          a_q <= z;
          b_q <= x;
        end else begin
          a_q <= a;
          b_q <= b;
        end
        ck_q[0] <= 1'b1;
        cv_q[0] <= cin;
        for (int i = 1; i < W; i++) begin
          ck_q[i] <= (x[i-1] == z[i-1]);
          cv_q[i] <= x[i-1];
        end
      end
    end else if (done) begin
      busy <= 1'b0;
    end else if (is_arith) begin
      ck_q <= ck_n;
      cv_q <= cv_n;
    end
  end
endmodule
