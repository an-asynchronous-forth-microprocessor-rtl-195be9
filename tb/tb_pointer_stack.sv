// tb_pointer_stack: random push, pop and replace operations on a 32 x 16
// pointer stack, compared with a ring-buffer model of the same depth
// (after reset the top reads 0). The run goes deeper than 32 entries and
// below the bottom so that the ring wraps both ways, and checks that each
// operation takes effect in one clock.
module tb_pointer_stack;
  localparam int D = 32;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [15:0] din = '0, top;
  logic [15:0] m [D];
  int sp = 0, depth = 0, maxdepth = 0, mindepth = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pointer_stack #(.W(16), .DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .push(push), .pop(pop),
                                          .din(din), .top(top));

  initial begin #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < D; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int k;
      @(negedge clk);
      checks++;
      if (top !== m[sp]) begin failures++; $display("FAIL step %0d top=%h exp=%h", i, top, m[sp]); end
      // phases: fill beyond the depth, drain below the bottom, then random
      k = (i < 40) ? 0 : (i < 120) ? 1 : $urandom_range(2, 0);
      push = (k == 0) || (k == 2);
      pop  = (k == 1) || (k == 2);
      din  = 16'($urandom());
      if (push && !pop) begin sp = (sp + 1) % D; m[sp] = din; depth++; end
      else if (pop && !push) begin sp = (sp + D - 1) % D; depth--; end
      else m[sp] = din;
      if (depth > maxdepth) maxdepth = depth;
      if (depth < mindepth) mindepth = depth;
    end
    checks++;
    if (maxdepth <= D || mindepth >= 0) begin failures++; $display("FAIL no wrap-around"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
