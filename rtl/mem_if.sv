// mem_if: the processor's single memory port. Inside, a client (the fetch
// or execute unit, chosen by the memory arbiter) holds "req" with address,
// write enable and write data until "done" pulses; read data is valid with
// done. Outside, the port is bundled data with a four-phase handshake: the
// interface raises mem_req with mem_addr/mem_we/mem_wdata stable, the memory
// answers with mem_ack (and mem_rdata for a read), the interface lowers
// mem_req, and the memory lowers mem_ack. Incoming read data is turned into
// dual-rail code with mem_ack as its strobe and turned back into single-rail
// bits by a converter whose completion tree confirms that every bit has
// arrived; that completion ends the access, and its return to empty
// (after mem_ack falls) ends the handshake. A new request is accepted only
// after that. The conversion mirrors the chip's dual-rail core and
// bundled-data pins; its use on the read path is this design's arrangement.
module mem_if
  import msl16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // client side
  input  logic              req,
  input  logic              we,
  input  logic [DATA_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic              done,
  output logic [DATA_W-1:0] rdata,
  // external memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata
);
  typedef enum logic [1:0] {M_IDLE, M_REQ, M_REL} mstate_e;

  mstate_e           st;
  logic [DATA_W-1:0] r1, r0, d;
  logic              complete;

  single_to_dual #(.W(DATA_W)) u_s2d (.d(mem_rdata), .strobe(mem_ack), .rail1(r1), .rail0(r0));
  dual_to_single #(.W(DATA_W)) u_d2s (.clk(clk), .rst_n(rst_n), .rail1(r1), .rail0(r0),
                                      .d(d), .strobe(complete));

  always_comb begin
    done  = (st == M_REQ) && complete;
    rdata = d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= M_IDLE;
      mem_req   <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (req && !complete) begin
                  st        <= M_REQ;
                  mem_req   <= 1'b1;
                  mem_we    <= we;
                  mem_addr  <= addr;
                  mem_wdata <= wdata;
                end
        M_REQ:  if (complete) begin
                  st      <= M_REL;
                  mem_req <= 1'b0;
                end
        M_REL:  if (!complete) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  four_phase_a: assert property (@(posedge clk) disable iff (!rst_n)
                                 (st == M_IDLE) |-> !mem_req);
endmodule
