// tb_c_element: drives 2- and 4-input C-elements with random input patterns
// and compares the output with a model of the rule "all high -> 1, all low
// -> 0, otherwise hold".
module tb_c_element;
  logic clk = 0, rst_n = 0;
  logic [1:0] in2;
  logic [3:0] in4;
  logic z2, z4, m2, m4;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  c_element #(.N(2)) u2 (.clk(clk), .rst_n(rst_n), .in(in2), .z(z2));
  c_element #(.N(4)) u4 (.clk(clk), .rst_n(rst_n), .in(in4), .z(z4));

  initial begin #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in2 = 0; in4 = 0; m2 = 0; m4 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in2 = 2'($urandom()); in4 = (i % 3 == 0) ? '1 : (i % 3 == 1) ? '0 : 4'($urandom());
      if (in2 == 2'b11) m2 = 1; else if (in2 == 2'b00) m2 = 0;
      if (in4 == 4'hF) m4 = 1; else if (in4 == 4'h0) m4 = 0;
      #1;
      checks += 2;
      if (z2 !== m2) begin failures++; $display("FAIL 2-input in=%b z=%b exp=%b", in2, z2, m2); end
      if (z4 !== m4) begin failures++; $display("FAIL 4-input in=%b z=%b exp=%b", in4, z4, m4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
