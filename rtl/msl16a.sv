// msl16a: a 16-bit Forth stack processor with 4-bit instructions, organised
// as concurrent processes that talk over handshakes: a fetch unit with a
// one-word prefetch register, an instruction register with a nibble PC, an
// execute unit holding the top-of-stack register T, an ALU with
// data-dependent completion time, two 32 x 16 pointer stacks (data and
// return), a word PC, and one memory port. The fetch and execute units share
// the memory port and the word PC through two arbiters.
//
// Every part advances on one clock, but no part assumes a fixed latency of
// another: each step waits for its partner's handshake, so the machine runs
// correctly with any memory speed and with additions of any length, as the
// asynchronous original does.
//
// External memory: 16-bit words, 16-bit addresses, four-phase bundled-data
// handshake (mem_req up with address/write data stable, mem_ack up with read
// data, mem_req down, mem_ack down). After reset the word PC is 0 and the
// first word executed is at address 1. psw is the processor status word
// that LIT in slot 3 loads into T; t shows the top-of-stack register.
module msl16a
  import msl16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] psw,
  output logic              mem_req,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic [DATA_W-1:0] t
);
  // arbiters: client 1 = fetch, client 2 = execute
  logic m_r1, m_g1, m_r2, m_g2;
  logic p_r1, p_g1, p_r2, p_g2;
  arbiter u_arb_mem (.clk(clk), .rst_n(rst_n), .r1(m_r1), .r2(m_r2), .g1(m_g1), .g2(m_g2));
  arbiter u_arb_pc  (.clk(clk), .rst_n(rst_n), .r1(p_r1), .r2(p_r2), .g1(p_g1), .g2(p_g2));

  // word PC
  logic             wpc_inc, wpc_we;
  logic [WPC_W-1:0] wpc_wdata, wpc_q, wpc_next;
  wpc u_wpc (.clk(clk), .rst_n(rst_n), .inc(wpc_inc), .we(wpc_we), .wdata(wpc_wdata),
             .q(wpc_q), .next(wpc_next));

  // memory port, with the address multiplexer of the two clients
  logic              f_mreq, x_mreq, x_mwe, mi_done;
  logic [DATA_W-1:0] f_maddr, x_maddr, x_mwdata, mi_rdata;
  mem_if u_mem (
    .clk(clk), .rst_n(rst_n),
    .req  ((m_g1 && f_mreq) || (m_g2 && x_mreq)),
    .we   (m_g2 && x_mwe),
    .addr (m_g1 ? f_maddr : x_maddr),
    .wdata(x_mwdata),
    .done (mi_done),
    .rdata(mi_rdata),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_ack(mem_ack), .mem_rdata(mem_rdata)
  );

  // fetch unit and instruction register
  logic              inst_valid, inst_ready, flush, call_resume;
  logic [DATA_W-1:0] inst_word;
  fetch_unit u_fetch (
    .clk(clk), .rst_n(rst_n),
    .pc_r(p_r1), .pc_g(p_g1), .wpc_next(wpc_next), .wpc_inc(wpc_inc),
    .mem_r(m_r1), .mem_g(m_g1), .mem_req(f_mreq), .mem_addr(f_maddr),
    .mem_done(mi_done), .mem_rdata(mi_rdata),
    .inst_valid(inst_valid), .inst_word(inst_word), .inst_ready(inst_ready),
    .flush(flush), .call_resume(call_resume)
  );

  logic  e_valid, e_done, e_skip;
  inst_t e_inst;
  ir_unit u_ir (
    .clk(clk), .rst_n(rst_n),
    .inst_valid(inst_valid), .inst_word(inst_word), .inst_ready(inst_ready),
    .e_valid(e_valid), .e_inst(e_inst), .e_done(e_done), .e_skip(e_skip)
  );

  // stacks
  logic              ds_push, ds_pop, rs_push, rs_pop;
  logic [DATA_W-1:0] ds_din, ds_top, rs_din, rs_top;
  pointer_stack u_ds (.clk(clk), .rst_n(rst_n), .push(ds_push), .pop(ds_pop), .din(ds_din), .top(ds_top));
  pointer_stack u_rs (.clk(clk), .rst_n(rst_n), .push(rs_push), .pop(rs_pop), .din(rs_din), .top(rs_top));

  // ALU
  logic              alu_req, alu_busy, alu_done;
  alu_op_e           alu_op;
  logic [DATA_W-1:0] alu_a, alu_b, alu_y;
  alu u_alu (.clk(clk), .rst_n(rst_n), .req(alu_req), .op(alu_op), .a(alu_a), .b(alu_b),
             .busy(alu_busy), .done(alu_done), .y(alu_y));

  // execute unit
  exec_unit u_exec (
    .clk(clk), .rst_n(rst_n),
    .e_valid(e_valid), .e_inst(e_inst), .e_done(e_done), .e_skip(e_skip),
    .ds_push(ds_push), .ds_pop(ds_pop), .ds_din(ds_din), .ds_top(ds_top),
    .rs_push(rs_push), .rs_pop(rs_pop), .rs_din(rs_din), .rs_top(rs_top),
    .alu_req(alu_req), .alu_op(alu_op), .alu_a(alu_a), .alu_b(alu_b),
    .alu_busy(alu_busy), .alu_done(alu_done), .alu_y(alu_y),
    .mem_r(m_r2), .mem_g(m_g2), .mem_req(x_mreq), .mem_we(x_mwe), .mem_addr(x_maddr),
    .mem_wdata(x_mwdata), .mem_done(mi_done), .mem_rdata(mi_rdata),
    .pc_r(p_r2), .pc_g(p_g2), .wpc_q(wpc_q), .wpc_we(wpc_we), .wpc_wdata(wpc_wdata),
    .flush(flush), .call_resume(call_resume),
    .psw(psw), .t(t)
  );
endmodule
