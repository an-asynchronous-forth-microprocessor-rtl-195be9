// tb_fetch_unit: the fetch unit with two arbiters, a word PC model and a
// memory model whose word at address A holds A in bits 14..0 and a CALL
// flag in bit 15 for every fifth address. The test plays the execute unit:
// it takes words at random times, occasionally takes the program-counter
// arbiter to redirect the PC and flush the prefetched word (a taken GOTO),
// and after each CALL word redirects the PC and raises call_resume.
// Checks: words arrive in address order starting at wpc+1, a flushed word
// is never delivered, the memory is only accessed while both grants are
// held, and no fetch starts between a CALL word and call_resume.
module tb_fetch_unit;
  import msl16_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pc_r, pc_g, p_r2 = 0, p_g2, wpc_inc, mem_r, mem_g, m_g2, mem_req, mem_done = 0;
  logic inst_valid, inst_ready = 0, flush = 0, call_resume = 0;
  logic [13:0] w = '0, wpc_next;
  logic [15:0] mem_addr, mem_rdata = '0, inst_word;
  int checks = 0, failures = 0, n_flush = 0, n_call = 0, n_words = 0;
  always #5 clk = ~clk;

  arbiter u_ap (.clk(clk), .rst_n(rst_n), .r1(pc_r), .r2(p_r2), .g1(pc_g), .g2(p_g2));
  arbiter u_am (.clk(clk), .rst_n(rst_n), .r1(mem_r), .r2(1'b0), .g1(mem_g), .g2(m_g2));

  fetch_unit dut (.clk(clk), .rst_n(rst_n), .pc_r(pc_r), .pc_g(pc_g), .wpc_next(wpc_next),
                  .wpc_inc(wpc_inc), .mem_r(mem_r), .mem_g(mem_g), .mem_req(mem_req),
                  .mem_addr(mem_addr), .mem_done(mem_done), .mem_rdata(mem_rdata),
                  .inst_valid(inst_valid), .inst_word(inst_word), .inst_ready(inst_ready),
                  .flush(flush), .call_resume(call_resume));

  assign wpc_next = w + 1'b1;
  always @(posedge clk) if (wpc_inc) w <= w + 1'b1;

  initial begin #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [15:0] word_at(logic [15:0] a);
    return {(a % 5) == 0, a[14:0]};
  endfunction

  // memory: completes a request after 0..3 cycles
  int mwait = 0;
  always @(negedge clk) begin
    mem_done = 0;
    if (mem_req) begin
      checks++;
      if (!(pc_g && mem_g)) begin failures++; $display("FAIL access without both grants"); end
      if (mwait == 0) begin mem_done = 1; mem_rdata = word_at(mem_addr); mwait = $urandom_range(3, 0); end
      else mwait--;
    end
  end

  bit in_call = 0;
  always @(posedge clk) if (rst_n && in_call && mem_req) begin
    failures++; $display("FAIL fetch while a CALL is pending");
  end

  initial begin
    logic [13:0] exp_addr;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_addr = 14'd1;
    while (n_words < 600) begin
      @(negedge clk);
      #1;
      inst_ready = 0;
      if (inst_valid && $urandom_range(1, 0)) begin
        // take the word
        checks++;
        if (inst_word[13:0] !== exp_addr) begin
          failures++; $display("FAIL got word of %h expected %h", inst_word[13:0], exp_addr);
        end
        inst_ready = 1;
        n_words++;
        if (inst_word[15]) begin
          // CALL: redirect the PC through the arbiter, then resume fetching
          in_call = 1;
          @(negedge clk); inst_ready = 0;
          repeat ($urandom_range(4, 1)) @(negedge clk);
          p_r2 = 1;
          while (!p_g2) @(negedge clk);
          w = 14'($urandom_range(16'h3F00, 16'h0100));
          call_resume = 1; in_call = 0;
          @(negedge clk); call_resume = 0; p_r2 = 0;
          exp_addr = w + 1'b1; n_call++;
        end else begin
          exp_addr = inst_word[13:0] + 1'b1;
        end
      end else if ($urandom_range(15, 0) == 0) begin
        // taken GOTO: take the PC arbiter, flush the prefetched word, redirect
        p_r2 = 1;
        @(negedge clk);
        while (!p_g2) @(negedge clk);
        if (inst_valid) n_flush++;
        flush = 1;
        w = 14'($urandom_range(16'h3F00, 16'h0100));
        @(negedge clk);
        flush = 0; p_r2 = 0;
        exp_addr = w + 1'b1;
      end
    end
    checks++;
    if (n_flush == 0 || n_call == 0) begin failures++; $display("FAIL coverage flush=%0d call=%0d", n_flush, n_call); end
    $display("words=%0d flush=%0d call=%0d", n_words, n_flush, n_call);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
