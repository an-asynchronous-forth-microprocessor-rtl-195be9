// tb_wpc: random increments and writes of the 14-bit word PC, compared
// with a model; checks next = q + 1 (with wrap-around at 3FFFh) and that a
// write wins over a simultaneous increment.
module tb_wpc;
  logic clk = 0, rst_n = 0;
  logic inc = 0, we = 0;
  logic [13:0] wdata = '0, q, next, m = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  wpc #(.W(14)) dut (.clk(clk), .rst_n(rst_n), .inc(inc), .we(we), .wdata(wdata), .q(q), .next(next));

  initial begin #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (q !== m) begin failures++; $display("FAIL q=%h exp=%h", q, m); end
      if (next !== 14'(m + 1)) begin failures++; $display("FAIL next=%h exp=%h", next, 14'(m + 1)); end
      inc = $urandom_range(1, 0);
      we = ($urandom_range(7, 0) == 0);
      wdata = (i % 50 == 0) ? 14'h3FFE : 14'($urandom());
      if (we) m = wdata; else if (inc) m = m + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
