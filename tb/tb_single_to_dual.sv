// tb_single_to_dual: random words with the strobe low and high. With the
// strobe low every rail must be low; with it high each bit must raise
// exactly the rail of its value.
module tb_single_to_dual;
  logic [15:0] d, r1, r0;
  logic        strobe;
  int checks = 0, failures = 0;

  single_to_dual #(.W(16)) dut (.d(d), .strobe(strobe), .rail1(r1), .rail0(r0));

  initial begin #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d = 16'($urandom()); strobe = i[0];
      #1;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (strobe ? !(r1[b] == d[b] && r0[b] == !d[b]) : (r1[b] || r0[b])) begin
          failures++;
          $display("FAIL bit %0d d=%b strobe=%b rails=%b%b", b, d[b], strobe, r1[b], r0[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
