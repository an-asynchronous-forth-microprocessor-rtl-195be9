// tb_ir_unit: feeds random instruction words and completes instructions
// with random delays and random skip requests. Checks that the slots are
// offered in order 0..3 with the right opcodes, that a word with bit 15 set
// is offered as a CALL, that a skip or slot 3 empties the register and
// loads the next word, and that no word is lost or repeated.
module tb_ir_unit;
  import msl16_pkg::*;
  logic clk = 0, rst_n = 0;
  logic inst_valid = 0, inst_ready, e_valid, e_done = 0, e_skip = 0;
  logic [15:0] inst_word = '0;
  inst_t e_inst;
  logic [15:0] words [$];
  int checks = 0, failures = 0, n_calls = 0, n_skips = 0;
  always #5 clk = ~clk;

  ir_unit dut (.clk(clk), .rst_n(rst_n), .inst_valid(inst_valid), .inst_word(inst_word),
               .inst_ready(inst_ready), .e_valid(e_valid), .e_inst(e_inst), .e_done(e_done),
               .e_skip(e_skip));

  initial begin #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // producer: offers words with random gaps
  int produced = 0;
  always @(negedge clk) if (rst_n) begin
    if (inst_valid && inst_ready_q) inst_valid = 0;
    if (!inst_valid && $urandom_range(2, 0) == 0) begin
      inst_word = 16'($urandom());
      words.push_back(inst_word);
      inst_valid = 1;
      produced++;
    end
  end
  logic inst_ready_q = 0;
  always @(posedge clk) inst_ready_q <= inst_ready && inst_valid;

  initial begin
    logic [15:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      // wait for the next word to be offered
      while (words.size() == 0) @(negedge clk);
      w = words.pop_front();
      for (int s = 0; s < 4; s++) begin
        int c;
        c = 0;
        while (!e_valid) begin @(negedge clk); c++; if (c > 100) break; end
        checks += 3;
        if (e_inst.word !== w) begin failures++; $display("FAIL word %h exp %h", e_inst.word, w); end
        if (e_inst.lpc !== 2'(s)) begin failures++; $display("FAIL lpc %0d exp %0d", e_inst.lpc, s); end
        if (e_inst.call !== (s == 0 && w[15]) ||
            (!(s == 0 && w[15]) && e_inst.op !== opcode_e'(w[15 - 4*s -: 4]))) begin
          failures++; $display("FAIL slot %0d of %h: call=%b op=%0d", s, w, e_inst.call, e_inst.op);
        end
        repeat ($urandom_range(2, 0)) @(negedge clk);
        e_done = 1;
        e_skip = (s == 0 && w[15]) || ($urandom_range(5, 0) == 0);
        if (s == 0 && w[15]) n_calls++;
        @(negedge clk);
        e_done = 0;
        if (e_skip) begin e_skip = 0; n_skips++; break; end
      end
    end
    checks++;
    if (n_calls == 0 || n_skips == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
