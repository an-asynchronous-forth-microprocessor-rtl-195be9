// tb_zero_checker: dual-rail words are presented bit by bit. "nonzero" must
// rise as soon as the first 1 bit arrives, before the word is complete;
// "zero" and "valid" only when all bits have arrived.
module tb_zero_checker;
  logic [15:0] r1 = '0, r0 = '0;
  logic nonzero, zero, valid;
  int checks = 0, failures = 0, early = 0;

  zero_checker #(.W(16)) dut (.rail1(r1), .rail0(r0), .nonzero(nonzero), .zero(zero), .valid(valid));

  initial begin #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int w = 0; w < 300; w++) begin
      logic [15:0] val;
      bit seen_one;
      int order [16];
      val = (w % 4 == 0) ? 16'h0000 : (w % 4 == 1) ? (16'h1 << (w % 16)) : 16'($urandom());
      for (int i = 0; i < 16; i++) order[i] = i;
      order.shuffle();
      r1 = '0; r0 = '0; seen_one = 0;
      for (int i = 0; i < 16; i++) begin
        if (val[order[i]]) begin r1[order[i]] = 1'b1; seen_one = 1; end
        else r0[order[i]] = 1'b1;
        #1;
        checks += 3;
        if (nonzero !== seen_one) begin failures++; $display("FAIL nonzero=%b", nonzero); end
        if (valid !== (i == 15)) begin failures++; $display("FAIL valid=%b at %0d", valid, i); end
        if (zero !== (i == 15 && val == 0)) begin failures++; $display("FAIL zero=%b", zero); end
        if (nonzero && i < 15) early++;
      end
    end
    checks++;
    if (early == 0) begin failures++; $display("FAIL no early decision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
