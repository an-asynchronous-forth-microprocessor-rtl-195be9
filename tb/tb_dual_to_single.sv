// tb_dual_to_single: a dual-rail word arrives bit by bit in random order,
// then returns to empty bit by bit. The strobe must stay low until the last
// bit is valid, then rise with the correct single-rail value, and must stay
// high until the last bit has returned to empty.
module tb_dual_to_single;
  logic clk = 0, rst_n = 0;
  logic [15:0] r1 = '0, r0 = '0, d;
  logic strobe;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dual_to_single #(.W(16)) dut (.clk(clk), .rst_n(rst_n), .rail1(r1), .rail0(r0),
                                .d(d), .strobe(strobe));

  initial begin #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 100; w++) begin
      logic [15:0] val;
      int order [16];
      val = 16'($urandom());
      for (int i = 0; i < 16; i++) order[i] = i;
      order.shuffle();
      // fill
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        if (val[order[i]]) r1[order[i]] = 1'b1; else r0[order[i]] = 1'b1;
        #1;
        checks++;
        if (strobe !== (i == 15)) begin failures++; $display("FAIL fill strobe=%b after %0d bits", strobe, i + 1); end
      end
      checks++;
      if (d !== val) begin failures++; $display("FAIL value %h expected %h", d, val); end
      order.shuffle();
      // empty
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        r1[order[i]] = 1'b0; r0[order[i]] = 1'b0;
        #1;
        checks++;
        if (strobe !== (i != 15)) begin failures++; $display("FAIL empty strobe=%b after %0d bits", strobe, i + 1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
