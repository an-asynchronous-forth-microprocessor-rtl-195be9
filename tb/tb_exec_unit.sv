// tb_exec_unit: the execute unit with its ALU, two pointer stacks, the two
// arbiters, a word PC and a small memory model, fed with random
// instructions (random slot, opcode and word, CALL words included). The
// test competes for both arbiters at random as the fetch unit would. After
// every completed instruction it compares, against a model written here,
// T, the tops of both stacks, the word PC, the skip flag, the flush and
// call_resume pulses, memory contents after stores, and for ALU
// instructions the number of cycles (1 for logic, shift and zero test; the
// carry-completion count for + and -), and for simple instructions that
// they complete in the cycle they are offered.
module tb_exec_unit;
  import msl16_pkg::*;
  logic clk = 0, rst_n = 0;
  logic e_valid = 0, e_done, e_skip;
  inst_t e_inst;
  logic ds_push, ds_pop, rs_push, rs_pop;
  logic [15:0] ds_din, ds_top, rs_din, rs_top;
  logic alu_req, alu_busy, alu_done;
  alu_op_e alu_op;
  logic [15:0] alu_a, alu_b, alu_y;
  logic m_r1 = 0, m_g1, mem_r, mem_g, mem_req, mem_we, mem_done = 0;
  logic [15:0] mem_addr, mem_wdata, mem_rdata = '0;
  logic p_r1 = 0, p_g1, pc_r, pc_g, wpc_we, flush, call_resume;
  logic [13:0] wpc_q, wpc_wdata, wpc_next;
  logic [15:0] psw = 16'hA55A, t;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  exec_unit dut (.*);
  pointer_stack #(.W(16), .DEPTH(32)) u_ds (.clk(clk), .rst_n(rst_n), .push(ds_push), .pop(ds_pop), .din(ds_din), .top(ds_top));
  pointer_stack #(.W(16), .DEPTH(32)) u_rs (.clk(clk), .rst_n(rst_n), .push(rs_push), .pop(rs_pop), .din(rs_din), .top(rs_top));
  alu #(.W(16), .CARRY_STEPS(4)) u_alu (.clk(clk), .rst_n(rst_n), .req(alu_req), .op(alu_op), .a(alu_a), .b(alu_b),
        .busy(alu_busy), .done(alu_done), .y(alu_y));
  arbiter u_am (.clk(clk), .rst_n(rst_n), .r1(m_r1), .r2(mem_r), .g1(m_g1), .g2(mem_g));
  arbiter u_ap (.clk(clk), .rst_n(rst_n), .r1(p_r1), .r2(pc_r), .g1(p_g1), .g2(pc_g));
  wpc #(.W(14)) u_wpc (.clk(clk), .rst_n(rst_n), .inc(1'b0), .we(wpc_we), .wdata(wpc_wdata), .q(wpc_q), .next(wpc_next));

  // memory: 256 words, answers after 0..3 cycles
  logic [15:0] mem [0:255];
  int mwait = 0;
  always @(negedge clk) begin
    mem_done = 0;
    if (mem_req) begin
      if (mwait == 0) begin
        mem_done = 1;
        if (mem_we) mem[mem_addr[7:0]] = mem_wdata; else mem_rdata = mem[mem_addr[7:0]];
        mwait = $urandom_range(3, 0);
      end else mwait--;
    end
  end

  // the fetch side competes for the arbiters
  always @(negedge clk) if (rst_n) begin
    if (!m_r1 && $urandom_range(3, 0) == 0) m_r1 = 1; else if (m_g1 && $urandom_range(1, 0)) m_r1 = 0;
    if (!p_r1 && $urandom_range(3, 0) == 0) p_r1 = 1; else if (p_g1 && $urandom_range(1, 0)) p_r1 = 0;
  end

  initial begin #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ------------- model
  logic [15:0] r_t = '0, r_ds [32], r_rs [32], r_mem [0:255];
  int r_dsp = 0, r_rsp = 0;
  logic [13:0] r_pc = '0;
  int op_count [17];

  function automatic int add_cycles(logic [15:0] x, logic [15:0] z);
    int run = 0, longest = 0;
    for (int i = 0; i < 15; i++) begin
      if (x[i] != z[i]) begin run++; if (run > longest) longest = run; end else run = 0;
    end
    return (longest <= 4) ? 1 : (longest + 3) / 4;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin r_ds[i] = '0; r_rs[i] = '0; end
    for (int i = 0; i < 256; i++) begin mem[i] = 16'($urandom()); r_mem[i] = mem[i]; end
    for (int i = 0; i <= 16; i++) op_count[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      inst_t ins;
      int cyc, exp_cyc;
      bit exp_skip, exp_flush, exp_resume, is_call;
      logic [15:0] x;
      ins.word = 16'($urandom());
      ins.lpc  = 2'($urandom());
      is_call  = (ins.lpc == 0) && ($urandom_range(7, 0) == 0);
      ins.word[15] = is_call ? 1'b1 : (ins.lpc == 0 ? 1'b0 : ins.word[15]);
      ins.call = is_call;
      ins.op   = opcode_e'(ins.word[15 - 4*ins.lpc -: 4]);
      @(negedge clk);
      exp_cyc = -1; exp_skip = 0; exp_flush = 0; exp_resume = 0;
      if (is_call) begin
        op_count[16]++;
        r_rsp = (r_rsp + 1) % 32; r_rs[r_rsp] = {2'b00, r_pc};
        r_pc = ins.word[13:0]; exp_skip = 1; exp_resume = 1;
      end else begin
        op_count[ins.op]++;
        unique case (ins.op)
          OP_NOP: exp_cyc = 1;
          OP_AND: begin r_t = r_t & r_ds[r_dsp]; r_dsp = (r_dsp + 31) % 32; exp_cyc = 2; end
          OP_XOR: begin r_t = r_t ^ r_ds[r_dsp]; r_dsp = (r_dsp + 31) % 32; exp_cyc = 2; end
          OP_ADD: begin exp_cyc = 1 + add_cycles(r_ds[r_dsp], r_t); r_t = r_t + r_ds[r_dsp]; r_dsp = (r_dsp + 31) % 32; end
          OP_SUB: begin exp_cyc = 1 + add_cycles(r_ds[r_dsp], ~r_t); r_t = r_ds[r_dsp] - r_t; r_dsp = (r_dsp + 31) % 32; end
          OP_ZEQ: begin r_t = (r_t == 0) ? 16'hFFFF : 16'h0; exp_cyc = 2; end
          OP_SHR: begin r_t = {r_t[15], r_t[15:1]}; exp_cyc = 2; end
          OP_LIT: begin
            r_dsp = (r_dsp + 1) % 32; r_ds[r_dsp] = r_t; exp_cyc = 1;
            if (ins.lpc == 0) begin r_t = {ins.word[7:0], 8'h00}; exp_skip = 1; end
            else if (ins.lpc == 1) begin r_t = {8'h00, ins.word[7:0]}; exp_skip = 1; end
            else r_t = psw;
          end
          OP_DUP: begin r_dsp = (r_dsp + 1) % 32; r_ds[r_dsp] = r_t; exp_cyc = 1; end
          OP_DROP: begin r_t = r_ds[r_dsp]; r_dsp = (r_dsp + 31) % 32; exp_cyc = 1; end
          OP_GOTO: begin
            if (r_t != 0) begin r_pc = r_t[13:0]; exp_skip = 1; exp_flush = 1; end
            else exp_cyc = 1;
            r_t = r_ds[r_dsp]; r_dsp = (r_dsp + 31) % 32;
          end
          OP_RTO: begin r_dsp = (r_dsp + 1) % 32; r_ds[r_dsp] = r_t; r_t = r_rs[r_rsp]; r_rsp = (r_rsp + 31) % 32; exp_cyc = 1; end
          OP_TOR: begin r_rsp = (r_rsp + 1) % 32; r_rs[r_rsp] = r_t; r_t = r_ds[r_dsp]; r_dsp = (r_dsp + 31) % 32; exp_cyc = 1; end
          OP_AT:  r_t = r_mem[r_t[7:0]];
          OP_ST:  begin x = r_ds[r_dsp]; r_mem[x[7:0]] = r_t; r_t = x; r_dsp = (r_dsp + 31) % 32; end
          OP_SWAP: begin x = r_ds[r_dsp]; r_ds[r_dsp] = r_t; r_t = x; exp_cyc = 1; end
        endcase
      end
      e_inst = ins; e_valid = 1;
      cyc = 0;
      begin
        bit saw_flush, saw_resume, skip, fin;
        saw_flush = 0; saw_resume = 0; skip = 0; fin = 0;
        while (!fin && cyc < 200) begin
          #1;
          saw_flush  |= flush;
          saw_resume |= call_resume;
          skip = e_skip;
          fin  = e_done;
          cyc++;
          @(negedge clk);
        end
        check("completed", cyc < 200, 1);
        check("skip", skip, exp_skip);
        check("flush", saw_flush, exp_flush);
        check("call_resume", saw_resume, exp_resume);
      end
      e_valid = 0;
      if (exp_cyc > 0) check($sformatf("cycles of op %0d", ins.op), cyc, exp_cyc);
      check("T", t, r_t);
      check("DS top", ds_top, r_ds[r_dsp]);
      check("RS top", rs_top, r_rs[r_rsp]);
      check("word PC", wpc_q, r_pc);
      if (!is_call && ins.op == OP_ST) for (int i = 0; i < 256; i++) if (mem[i] !== r_mem[i]) check("memory", i, -1);
      // give the ALU its idle cycle back sometimes, never required
      if ($urandom_range(1, 0)) @(negedge clk);
    end
    for (int i = 0; i <= 16; i++) check($sformatf("opcode %0d exercised", i), op_count[i] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
