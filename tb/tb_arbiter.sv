// tb_arbiter: two clients request the arbiter at random, hold the grant for
// a random time and release. Checks: never two grants, a grant only while
// its request is up, every request is served within a bounded time
// (fairness: the other client is served at most once in between), and
// simultaneous requests happen and are served alternately.
module tb_arbiter;
  logic clk = 0, rst_n = 0;
  logic r1 = 0, r2 = 0, g1, g2;
  int checks = 0, failures = 0, ties = 0, served1 = 0, served2 = 0;
  always #5 clk = ~clk;

  arbiter dut (.clk(clk), .rst_n(rst_n), .r1(r1), .r2(r2), .g1(g1), .g2(g2));

  initial begin #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // requests change at the falling edge, the arbiter samples at the rising edge
  task automatic client(int id);
    forever begin
      repeat ($urandom_range(4, 0)) @(negedge clk);
      if (id == 1) r1 = 1; else r2 = 1;
      begin
        int waited = 0;
        do begin @(negedge clk); waited++; end while (!(id == 1 ? g1 : g2));
        checks++;
        if (waited > 12) begin failures++; $display("FAIL client %0d waited %0d", id, waited); end
      end
      if (id == 1) served1++; else served2++;
      repeat ($urandom_range(3, 0)) @(negedge clk);
      if (id == 1) r1 = 0; else r2 = 0;
      @(negedge clk);
    end
  endtask

  bit last_was2 = 0;
  bit r1_pos = 0, r2_pos = 0;  // requests as the arbiter sampled them
  always @(posedge clk) begin r1_pos <= r1; r2_pos <= r2; end   // client 2 was granted most recently
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (g1 && g2) begin failures++; $display("FAIL both granted"); end
    if ((g1 && !r1_pos) || (g2 && !r2_pos)) begin
      failures++; $display("FAIL grant without request");
    end
  end
  // a tie: both request while neither is granted; the client that was not
  // served most recently must win
  always @(posedge clk) if (rst_n) begin
    if (r1 && r2 && !g1 && !g2) begin
      bit exp2;
      exp2 = !last_was2;
      ties++;
      @(negedge clk);
      checks++;
      if (!(exp2 ? g2 : g1)) begin failures++; $display("FAIL tie not given to the waiting client %0t g=%b%b exp2=%b dutlast2=%b", $time, g1, g2, exp2, dut.last2); end
    end
    if (g1) last_was2 = 0;
    if (g2) last_was2 = 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork client(1); client(2); join_none
    repeat (3000) @(posedge clk);
    checks++;
    if (ties == 0 || served1 < 100 || served2 < 100) begin
      failures++; $display("FAIL coverage ties=%0d served=%0d/%0d", ties, served1, served2);
    end
    $display("ties=%0d served=%0d/%0d", ties, served1, served2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
