// msl16_mem_model: behavioural model of the external 64K x 16 memory for
// testbenches. It answers the processor's four-phase bundled-data handshake
// after a random delay of 0..MAX_WAIT cycles on each edge of mem_ack, and
// counts accesses and the cycles spent waiting. Contents are set by the
// testbench through the mem array.
module msl16_mem_model #(
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [15:0] mem_addr,
  input  logic [15:0] mem_wdata,
  output logic        mem_ack,
  output logic [15:0] mem_rdata
);
  logic [15:0] mem [0:65535];
  int unsigned wait_cnt = 0;
  int unsigned reads = 0, writes = 0, wait_cycles = 0;

  initial begin
    mem_ack   = 1'b0;
    mem_rdata = '0;
  end

  always @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      if (wait_cnt == 0) begin
        if (mem_we) begin
          mem[mem_addr] <= mem_wdata;
          writes++;
        end else begin
          mem_rdata <= mem[mem_addr];
          reads++;
        end
        mem_ack  <= 1'b1;
        wait_cnt <= $urandom_range(MAX_WAIT, 0);
      end else begin
        wait_cnt <= wait_cnt - 1;
        wait_cycles++;
      end
    end else if (!mem_req && mem_ack) begin
      if (wait_cnt == 0) begin
        mem_ack   <= 1'b0;
        mem_rdata <= $urandom();  // bundled data is undefined while ack is low
        wait_cnt  <= $urandom_range(MAX_WAIT, 0);
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
    end
  end
endmodule
