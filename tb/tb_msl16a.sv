// tb_msl16a: end-to-end test of the msl16a processor at its default sizes
// (32-entry stacks, 14-bit word PC, 16-bit data).
//
// Phase 1 runs the processor test program: the sequence that exercises
// every instruction (1-1 through the worst-case carry path, XOR and DUP,
// >R and R>, 0=, a taken GOTO, ! and @ at address FF00, a CALL and its
// return), placed so that label b is at 0013h and the branch operand is
// 0012h. The words between 000Ch and 0012h are skipped by the GOTO and are
// filled with LITs that must never execute. The program ends in a GOTO to
// itself. Phase 2 resets the processor and runs a long random program from
// a memory filled with random words (everything except !), so branches,
// calls, ALU operations and stack wrap-around happen in random order.
//
// Checking: an instruction-level reference model written here runs in step
// with the processor. Each time the execute unit completes an instruction,
// the instruction it executed (slot, opcode, word) must be the one the model
// expects; one cycle later T and the tops of both stacks must equal the
// model's. Memory writes are compared as well. The test also counts how
// often each mechanism occurred (prefetch discard, CALL stall, LIT skip,
// status word load, arbiter contention, multi-cycle addition, memory wait,
// stack wrap) and counts a failure for any that never happened.
module tb_msl16a;
  import msl16_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] psw = 16'h0001;
  logic        mem_req, mem_we, mem_ack;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, t;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msl16a dut (.clk(clk), .rst_n(rst_n), .psw(psw), .mem_req(mem_req), .mem_we(mem_we),
              .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_ack(mem_ack),
              .mem_rdata(mem_rdata), .t(t));

  msl16_mem_model #(.MAX_WAIT(3)) u_mem (.clk(clk), .mem_req(mem_req), .mem_we(mem_we),
              .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_ack(mem_ack),
              .mem_rdata(mem_rdata));

  // ---------------------------------------------------------------------
  // reference model
  logic [15:0] rmem [0:65535];
  logic [15:0] r_t;
  logic [15:0] r_ds [0:31];
  logic [15:0] r_rs [0:31];
  int          r_dsp, r_rsp;
  logic [13:0] r_pc;
  logic [15:0] r_ir;
  int          r_lpc;
  bit          r_need_fetch;

  function automatic void r_reset();
    r_t = '0; r_pc = '0; r_lpc = 0; r_need_fetch = 1; r_ir = '0;
    r_dsp = 0; r_rsp = 0;
    for (int i = 0; i < 32; i++) begin r_ds[i] = '0; r_rs[i] = '0; end
  endfunction

  int n_ds_wrap = 0;
  function automatic void ds_push(logic [15:0] x);
    if (r_dsp == 31) n_ds_wrap++;
    r_dsp = (r_dsp + 1) % 32; r_ds[r_dsp] = x;
  endfunction
  function automatic logic [15:0] ds_pop();
    logic [15:0] x = r_ds[r_dsp];
    if (r_dsp == 0) n_ds_wrap++;
    r_dsp = (r_dsp + 31) % 32;
    return x;
  endfunction
  function automatic void rs_push(logic [15:0] x);
    r_rsp = (r_rsp + 1) % 32; r_rs[r_rsp] = x;
  endfunction
  function automatic logic [15:0] rs_pop();
    logic [15:0] x = r_rs[r_rsp];
    r_rsp = (r_rsp + 31) % 32;
    return x;
  endfunction

  function automatic void r_fetch_if_needed();
    if (r_need_fetch) begin
      r_pc = r_pc + 1'b1;
      r_ir = rmem[{2'b00, r_pc}];
      r_lpc = 0;
      r_need_fetch = 0;
    end
  endfunction

  // next instruction of the model: call flag, opcode, slot
  function automatic logic [5:0] r_peek();
    logic [3:0] op;
    r_fetch_if_needed();
    op = r_ir[15 - 4*r_lpc -: 4];
    return {(r_lpc == 0) && r_ir[15], op, 1'b0} | 6'(0);
  endfunction

  int n_lit_skip = 0, n_psw = 0, n_goto_taken = 0, n_calls = 0;
  int op_seen [0:16];

  function automatic void r_step();
    logic [3:0]  op;
    logic [15:0] x;
    bit          skip = 0;
    r_fetch_if_needed();
    op = r_ir[15 - 4*r_lpc -: 4];
    if (r_lpc == 0 && r_ir[15]) begin
      op_seen[16]++; n_calls++;
      rs_push({2'b00, r_pc});
      r_pc = r_ir[13:0];
      skip = 1;
    end else begin
      op_seen[op]++;
      unique case (op)
        4'd0: ;
        4'd1: r_t = r_t & ds_pop();
        4'd2: r_t = r_t ^ ds_pop();
        4'd3: r_t = r_t + ds_pop();
        4'd4: r_t = (r_t == 0) ? 16'hFFFF : 16'h0000;
        4'd5: begin
          ds_push(r_t);
          if (r_lpc == 0)      begin r_t = {r_ir[7:0], 8'h00}; skip = 1; n_lit_skip++; end
          else if (r_lpc == 1) begin r_t = {8'h00, r_ir[7:0]}; skip = 1; n_lit_skip++; end
          else begin r_t = psw; n_psw++; end
        end
        4'd6: r_t = {r_t[15], r_t[15:1]};
        4'd7: r_t = ds_pop() - r_t;
        4'd8: ds_push(r_t);
        4'd9: r_t = ds_pop();
        4'd10: begin
          if (r_t != 0) begin r_pc = r_t[13:0]; skip = 1; n_goto_taken++; end
          r_t = ds_pop();
        end
        4'd11: begin ds_push(r_t); r_t = rs_pop(); end
        4'd12: begin rs_push(r_t); r_t = ds_pop(); end
        4'd13: r_t = rmem[r_t];
        4'd14: begin x = ds_pop(); rmem[x] = r_t; r_t = x; end
        4'd15: begin x = r_ds[r_dsp]; r_ds[r_dsp] = r_t; r_t = x; end
      endcase
    end
    if (skip || r_lpc == 3) r_need_fetch = 1;
    else r_lpc++;
  endfunction

  // ---------------------------------------------------------------------
  // program assembly helpers
  function automatic logic [15:0] w4(int a, int b, int c, int d);
    return {a[3:0], b[3:0], c[3:0], d[3:0]};
  endfunction
  function automatic logic [15:0] lit0(int v);  // LIT in slot 0: T := v << 8
    return {4'd5, 4'd0, v[7:0]};
  endfunction
  function automatic logic [15:0] lit1(int s0, int v);  // slot0 op, LIT in slot 1: T := v
    return {s0[3:0], 4'd5, v[7:0]};
  endfunction

  localparam int NOP = 0, AND = 1, XOR = 2, ADD = 3, ZEQ = 4, LIT = 5, SHR = 6, SUB = 7,
                 DUP = 8, DROP = 9, GOTO = 10, RTO = 11, TOR = 12, AT = 13, ST = 14, SWAP = 15;

  task automatic load_test_program();
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = '0;
    // a: starts at word 1 (the word PC resets to 0 and is advanced before a fetch)
    u_mem.mem[16'h01] = lit1(NOP, 1);                 // NOP LIT 1
    u_mem.mem[16'h02] = lit1(NOP, 1);                 // NOP LIT 1
    u_mem.mem[16'h03] = lit1(SUB, 1);                 // - LIT 1
    u_mem.mem[16'h04] = w4(NOP, SWAP, ADD, LIT);      // NOP SWAP + LIT (status word)
    u_mem.mem[16'h05] = lit0(8'hFF);                  // LIT FF00
    u_mem.mem[16'h06] = lit1(NOP, 8'hFF);             // NOP LIT FF
    u_mem.mem[16'h07] = w4(XOR, XOR, DUP, DUP);
    u_mem.mem[16'h08] = w4(XOR, TOR, RTO, NOP);
    u_mem.mem[16'h09] = lit0(0);                      // LIT 0
    u_mem.mem[16'h0A] = lit1(ZEQ, 8'h12);             // 0= LIT b-1
    u_mem.mem[16'h0B] = w4(AND, GOTO, NOP, NOP);
    for (int i = 16'h0C; i <= 16'h12; i++)
      u_mem.mem[i] = lit0(8'hEE);                     // skipped by the GOTO
    // b:
    u_mem.mem[16'h13] = lit0(8'hFF);                  // LIT FF00
    u_mem.mem[16'h14] = lit1(NOP, 10);                // NOP LIT 10
    u_mem.mem[16'h15] = w4(NOP, ST, AT, DROP);
    u_mem.mem[16'h16] = w4(NOP, DROP, NOP, NOP);
    u_mem.mem[16'h17] = 16'h8000 | 16'h001A;          // CALL c (target c-1)
    u_mem.mem[16'h18] = w4(SHR, DUP, ADD, NOP);       // 2/ and + after return
    u_mem.mem[16'h19] = lit1(NOP, 8'h1D);             // NOP LIT halt-1
    u_mem.mem[16'h1A] = w4(NOP, DUP, GOTO, NOP);
    // c:
    u_mem.mem[16'h1B] = w4(NOP, RTO, GOTO, NOP);      // subroutine return
    u_mem.mem[16'h1C] = 16'h0000;
    // halt: loop on itself
    u_mem.mem[16'h1E] = lit1(NOP, 8'h1D);
    u_mem.mem[16'h1F] = w4(NOP, DUP, GOTO, NOP);
    for (int i = 0; i < 65536; i++) rmem[i] = u_mem.mem[i];
  endtask

  task automatic load_random_program();
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] w = 16'($urandom());
      // no stores: a store could overwrite a word that is already prefetched
      for (int s = 0; s < 4; s++)
        if (w[15 - 4*s -: 4] == 4'd14 && !(s == 0 && w[15])) w[15 - 4*s -: 4] = 4'd3;
      // fewer calls and gotos, so straight-line code runs long enough
      if (w[15] && ($urandom_range(3, 0) != 0)) w[15] = 1'b0;
      u_mem.mem[i] = w;
      rmem[i]      = w;
    end
  endtask

  // ---------------------------------------------------------------------
  // lock-step comparison, sampled at the falling edge
  bit   pending = 0;
  bit   compare_on = 0;
  int   n_instr = 0;
  int   ph1_t_trace [$];

  always @(negedge clk) begin
    if (rst_n && compare_on) begin
      if (pending) begin
        checks++;
        if (t !== r_t || dut.ds_top !== r_ds[r_dsp] || dut.rs_top !== r_rs[r_rsp]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH after instr %0d: T=%h/%h DS=%h/%h RS=%h/%h", n_instr,
                     t, r_t, dut.ds_top, r_ds[r_dsp], dut.rs_top, r_rs[r_rsp]);
        end
        pending = 0;
      end
      if (dut.e_done) begin
        logic [5:0] exp;
        exp = r_peek();
        checks++;
        if (dut.e_inst.call !== exp[5] || (!exp[5] && dut.e_inst.op !== opcode_e'(exp[4:1])) ||
            dut.e_inst.lpc !== 2'(r_lpc) || dut.e_inst.word !== r_ir) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH instr %0d: dut call=%b op=%0d lpc=%0d word=%h, model call=%b op=%0d lpc=%0d word=%h",
                     n_instr, dut.e_inst.call, dut.e_inst.op, dut.e_inst.lpc, dut.e_inst.word,
                     exp[5], exp[4:1], r_lpc, r_ir);
        end
        r_step();
        ph1_t_trace.push_back(int'(r_t));
        pending = 1;
        n_instr++;
      end
    end
  end

  // memory writes must match the model's
  always @(posedge clk)
    if (rst_n && compare_on && mem_req && mem_we && !mem_ack) begin
      checks++;
      if (mem_wdata !== r_t || mem_addr !== r_ds[r_dsp]) begin
        failures++;
        $display("MISMATCH store: mem[%h] := %h, model mem[%h] := %h", mem_addr, mem_wdata,
                 r_ds[r_dsp], r_t);
      end
    end

  // ---------------------------------------------------------------------
  // mechanism counters
  int n_flush = 0, n_call_stall = 0, n_arb_m_conflict = 0, n_arb_pc_conflict = 0;
  int n_long_add = 0, n_alu_busy = 0, n_mem_wait = 0, n_mem_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.flush && dut.u_fetch.jr_valid) n_flush++;
    if (dut.u_fetch.call_wait && !dut.u_fetch.jr_valid) n_call_stall++;
    if (dut.m_r1 && dut.m_r2) n_arb_m_conflict++;
    if (dut.p_r1 && dut.p_r2) n_arb_pc_conflict++;
    if (dut.alu_busy && !dut.alu_done && (dut.u_alu.op_q == ALU_SUB || dut.u_alu.op_q == ALU_ADD))
      n_alu_busy++;
    if (dut.alu_done && dut.u_alu.op_q == ALU_SUB && dut.u_alu.a_q == 16'hFFFE && dut.u_alu.b_q == 16'h0001)
      n_long_add++;
    if (mem_req && !mem_ack) n_mem_wait++;
    if (!dut.e_valid) n_mem_stall++;
  end

  // ---------------------------------------------------------------------
  int unsigned cycle = 0;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run_until_instr(int n, int max_cycles);
    int c = 0;
    while (n_instr < n && c < max_cycles) begin @(posedge clk); c++; end
  endtask

  initial begin
    for (int i = 0; i <= 16; i++) op_seen[i] = 0;
    // ---------------- phase 1: the test program
    load_test_program();
    r_reset();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    compare_on = 1'b1;
    run_until_instr(60, 5000);
    // known points of the run
    expect_eq("mem[FF00] after !", u_mem.mem[16'hFF00], 16'h000A);
    expect_eq("instructions executed", (n_instr >= 60), 1);
    $display("wpc at end of phase 1: %h", dut.u_wpc.q);
    expect_eq("halted at the self loop", (dut.u_wpc.q >= 14'h1D && dut.u_wpc.q <= 14'h20), 1);
    // T after 1-1 = 0 (fifth instruction: NOP LIT NOP LIT -)
    expect_eq("T after 1-1", ph1_t_trace[4], 0);
    // T after XOR XOR: the status word (0001h) complemented
    expect_eq("complement of psw", ph1_t_trace[14], 16'hFFFE);
    // T through XOR >R R> NOP, LIT 0, 0= LIT, AND GOTO, LIT FF00, NOP LIT 10
    begin
      int exp_t [13] = '{16'h0000, 16'hFFFE, 16'h0000, 16'h0000, 16'h0000, 16'hFFFF,
                         16'h0012, 16'h0012, 16'h0000, 16'hFF00, 16'hFF00, 16'h000A, 16'h000A};
      for (int i = 0; i < 13; i++)
        expect_eq($sformatf("T after instruction %0d", 17 + i), ph1_t_trace[17 + i], exp_t[i]);
    end
    expect_eq("the skipped words never ran", (r_ir != lit0(8'hEE)), 1);
    // ---------------- phase 2: random program
    rst_n = 1'b0;
    compare_on = 1'b0;
    repeat (3) @(posedge clk);
    psw = 16'h1234;
    load_random_program();
    r_reset();
    pending = 0;
    n_instr = 0;
    rst_n = 1'b1;
    compare_on = 1'b1;
    run_until_instr(20000, 300000);
    expect_eq("random instructions executed", (n_instr >= 20000), 1);

    // every mechanism must have happened
    expect_eq("prefetched word discarded by a taken GOTO", n_flush > 0, 1);
    expect_eq("fetch stalled behind a CALL", n_call_stall > 0, 1);
    expect_eq("LIT skipped the rest of a word", n_lit_skip > 0, 1);
    expect_eq("status word loaded", n_psw > 0, 1);
    expect_eq("memory arbiter contention", n_arb_m_conflict > 0, 1);
    expect_eq("PC arbiter contention", n_arb_pc_conflict > 0, 1);
    expect_eq("worst-case carry 1-1", n_long_add > 0, 1);
    expect_eq("multi-cycle addition", n_alu_busy > 0, 1);
    expect_eq("memory wait states", n_mem_wait > 0, 1);
    expect_eq("data stack wrapped", n_ds_wrap > 0, 1);
    for (int i = 0; i <= 16; i++) expect_eq($sformatf("opcode %0d executed", i), op_seen[i] > 0, 1);
    $display("instr=%0d cycles=%0d flush=%0d callstall=%0d litskip=%0d psw=%0d armM=%0d arbPC=%0d longadd=%0d addbusy=%0d memwait=%0d dswrap=%0d",
             n_instr, cycle, n_flush, n_call_stall, n_lit_skip, n_psw, n_arb_m_conflict,
             n_arb_pc_conflict, n_long_add, n_alu_busy, n_mem_wait, n_ds_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
