// tb_alu: every ALU function on random and corner operands. Results are
// compared with SystemVerilog arithmetic, and the number of cycles from
// request to completion is compared with the carry-completion rule: one
// cycle for logic, shift and zero test, max(1, ceil(L / CARRY_STEPS)) for
// + and -, where L is the longest run of propagate bits (x != z) in bits
// 0..14 of the adder inputs (x = b, z = a for +, z = ~a for -). 1-1 must
// take the longest time.
module tb_alu;
  import msl16_pkg::*;
  localparam int STEPS = 4;
  logic clk = 0, rst_n = 0;
  logic req = 0, busy, done;
  alu_op_e op;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  alu #(.W(16), .CARRY_STEPS(STEPS)) dut (.clk(clk), .rst_n(rst_n), .req(req), .op(op),
        .a(a), .b(b), .busy(busy), .done(done), .y(y));

  initial begin #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int exp_cycles(alu_op_e o, logic [15:0] aa, logic [15:0] bb);
    logic [15:0] x, z;
    int run = 0, longest = 0;
    if (o != ALU_ADD && o != ALU_SUB) return 1;
    x = bb; z = (o == ALU_SUB) ? ~aa : aa;
    for (int i = 0; i < 15; i++) begin
      if (x[i] != z[i]) begin run++; if (run > longest) longest = run; end
      else run = 0;
    end
    return (longest <= STEPS) ? 1 : (longest + STEPS - 1) / STEPS;
  endfunction

  function automatic logic [15:0] exp_y(alu_op_e o, logic [15:0] aa, logic [15:0] bb);
    case (o)
      ALU_AND: return aa & bb;
      ALU_XOR: return aa ^ bb;
      ALU_ADD: return aa + bb;
      ALU_SUB: return bb - aa;
      ALU_SHR: return 16'($signed(aa) >>> 1);
      default: return (aa == 0) ? 16'hFFFF : 16'h0000;
    endcase
  endfunction

  int worst = 0;
  task automatic one(alu_op_e o, logic [15:0] aa, logic [15:0] bb);
    int c = 0;
    @(negedge clk);
    op = o; a = aa; b = bb; req = 1;
    @(negedge clk);
    req = 0; a = 16'($urandom()); b = 16'($urandom());  // operands are latched
    c = 1;
    while (!done) begin @(negedge clk); c++; end
    checks += 2;
    if (y !== exp_y(o, aa, bb)) begin
      failures++; $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), aa, bb, y, exp_y(o, aa, bb));
    end
    if (c != exp_cycles(o, aa, bb)) begin
      failures++; $display("FAIL op=%s a=%h b=%h took %0d cycles, expected %0d", o.name(), aa, bb, c, exp_cycles(o, aa, bb));
    end
    if (o == ALU_SUB && aa == 1 && bb == 1) worst = c;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(ALU_SUB, 16'h0001, 16'h0001);   // 1-1: worst-case carry
    checks++;
    if (worst != 4) begin failures++; $display("FAIL 1-1 took %0d cycles", worst); end
    one(ALU_ADD, 16'h0001, 16'h0001);
    one(ALU_ADD, 16'hFFFF, 16'h0001);
    one(ALU_ZEQ, 16'h0000, 16'h1234);
    one(ALU_ZEQ, 16'h8000, 16'h1234);
    one(ALU_SHR, 16'h8001, 16'h0);
    for (int i = 0; i < 2000; i++)
      one(alu_op_e'($urandom_range(5, 0)), 16'($urandom()), 16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
