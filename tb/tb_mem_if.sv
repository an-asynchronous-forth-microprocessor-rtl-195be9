// tb_mem_if: random reads and writes through the memory interface against
// the behavioural memory with random wait states. Checks read data, that
// writes land in memory, that "done" pulses exactly once per access, and
// that the external handshake keeps the four-phase order (no new request
// before mem_ack has fallen).
module tb_mem_if;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0, done;
  logic [15:0] addr = '0, wdata = '0, rdata;
  logic mem_req, mem_we, mem_ack;
  logic [15:0] mem_addr, mem_wdata, mem_rdata;
  logic [15:0] model [0:255];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mem_if dut (.clk(clk), .rst_n(rst_n), .req(req), .we(we), .addr(addr), .wdata(wdata),
              .done(done), .rdata(rdata), .mem_req(mem_req), .mem_we(mem_we),
              .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_ack(mem_ack), .mem_rdata(mem_rdata));
  msl16_mem_model #(.MAX_WAIT(3)) u_mem (.clk(clk), .mem_req(mem_req), .mem_we(mem_we),
              .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_ack(mem_ack), .mem_rdata(mem_rdata));

  initial begin #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // four-phase order on the external side
  logic req_q = 0, ack_q = 0;
  always @(posedge clk) begin
    if (rst_n && mem_req && !req_q && ack_q) begin
      failures++; $display("FAIL new request while ack still high");
    end
    req_q <= mem_req; ack_q <= mem_ack;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin model[i] = 16'($urandom()); u_mem.mem[i] = model[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int c;
      c = 0;
      @(negedge clk);
      req = 1; we = $urandom_range(1, 0); addr = 16'($urandom_range(255, 0)); wdata = 16'($urandom());
      @(negedge clk);
      while (!done) begin @(negedge clk); c++; if (c > 50) break; end
      checks++;
      if (!done) begin failures++; $display("FAIL no completion"); end
      else if (!we) begin
        checks++;
        if (rdata !== model[addr]) begin failures++; $display("FAIL read %h = %h exp %h", addr, rdata, model[addr]); end
      end else model[addr] = wdata;
      @(negedge clk);
      req = 0;
      checks++;
      if (done) begin failures++; $display("FAIL done held for two cycles"); end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (u_mem.mem[i] !== model[i]) begin failures++; $display("FAIL mem[%0d]", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
