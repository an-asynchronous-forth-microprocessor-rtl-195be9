// tb_forth_primitives: runs the Forth words that the instruction set does
// not provide directly, in their instruction-sequence translations, on the
// full msl16a processor at its default sizes.
//
// The translations exercised: 2* (DUP +), DDROP (DROP DROP), OVER
// (>R DUP R> SWAP), EXIT (R> GOTO after a CALL), BRANCH (a 16-bit literal
// built from two LITs and XOR, then GOTO) and 0BRANCH (0=, the literal,
// AND, GOTO), the latter both with a zero flag (branch taken) and a
// non-zero flag (falls through). For each one a small program is assembled
// from word address 1: it loads operands with literals, runs the
// translation, writes the resulting stack contents to fixed data addresses
// with "!", writes a completion marker and stops in a two-word loop. The
// results are compared with the meaning of the Forth word, worked out here
// from the operands. Code that a branch must skip writes a poison value
// that is checked to be absent. The size of every translation in bits
// (4 per instruction, 16 per literal operand, as the code-density estimate
// of the original counts them) is checked against the expected totals
// 8, 8, 16, 8, 40 and 48.
//
// The assembler below packs instructions four per word: an opcode of 8 or
// more never goes to slot 0 (it would read as a CALL), a LIT with a high
// byte fills a whole word from slot 0 and a LIT with a low byte sits in
// slot 1 with its operand in slots 2 and 3. The memory answers with random
// wait states. A watchdog ends the run if a program never completes.
module tb_forth_primitives;
  import msl16_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] psw = 16'h0000;
  logic        mem_req, mem_we, mem_ack;
  logic [15:0] mem_addr, mem_wdata, mem_rdata, t;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msl16a dut (.clk(clk), .rst_n(rst_n), .psw(psw), .mem_req(mem_req), .mem_we(mem_we),
              .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_ack(mem_ack),
              .mem_rdata(mem_rdata), .t(t));

  msl16_mem_model #(.MAX_WAIT(2)) u_mem (.clk(clk), .mem_req(mem_req), .mem_we(mem_we),
              .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_ack(mem_ack),
              .mem_rdata(mem_rdata));

  localparam int NOP = 0, AND = 1, XOR = 2, ADD = 3, ZEQ = 4, LIT = 5, SHR = 6, SUB = 7,
                 DUP = 8, DROP = 9, GOTO = 10, RTO = 11, TOR = 12, AT = 13, ST = 14, SWAP = 15;
  localparam logic [15:0] DONE_ADDR = 16'h00FF, DONE_MARK = 16'hD00E;
  localparam logic [15:0] POISON = 16'hBAD0;
  localparam logic [7:0]  RES0 = 8'hF0;  // results go to F0h, F1h, ...

  // ---------------------------------------------------------------------
  // assembler
  logic [15:0] cur;      // word being filled
  int          slot;     // next free slot of cur
  int          pc_asm;   // address of cur
  int          bits;     // size counter for one translation

  function automatic void asm_start();
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = '0;
    cur = '0; slot = 0; pc_asm = 1;
  endfunction
  function automatic void flush_word();
    if (slot != 0) begin
      u_mem.mem[pc_asm] = cur;
      pc_asm++;
      cur  = '0;
      slot = 0;
    end
  endfunction
  function automatic void op(int code);
    if (slot == 0 && code >= 8) slot = 1;  // slot 0 keeps a NOP
    cur[15 - 4*slot -: 4] = code[3:0];
    slot++;
    bits += 4;
    if (slot == 4) flush_word();
  endfunction
  // LIT in slot 0: T := b << 8
  function automatic void lit_hi(int b);
    flush_word();
    cur = {4'(LIT), 4'h0, b[7:0]};
    slot = 4;
    bits += 16;
    flush_word();
  endfunction
  // LIT in slot 1: T := b
  function automatic void lit_lo(int b);
    if (slot > 1) flush_word();
    cur[11:0] = {4'(LIT), b[7:0]};
    slot = 4;
    bits += 16;
    flush_word();
  endfunction
  // a full 16-bit literal: LIT hi, LIT lo, XOR (one net push)
  function automatic void lit16(int v);
    lit_hi(v >> 8);
    lit_lo(v & 8'hFF);
    op(XOR);
  endfunction
  // address the next instruction will be assembled at, as a word start
  function automatic int label();
    flush_word();
    return pc_asm;
  endfunction
  function automatic void call(int target_word);
    flush_word();
    u_mem.mem[pc_asm] = 16'h8000 | 16'(target_word - 1);  // continues at target
    pc_asm++;
  endfunction
  // mem[addr] := T, T := next element. "!" stores T at the address held in
  // DS and leaves that address in T, so a DROP follows it.
  function automatic void store_t(int addr);
    lit_lo(addr);
    op(SWAP);
    op(ST);
    op(DROP);
  endfunction
  function automatic void finish();
    int a;
    lit16(DONE_MARK);
    store_t(DONE_ADDR);
    a = label();
    u_mem.mem[a]     = {4'(NOP), 4'(LIT), 8'(a - 1)};  // T := a-1
    u_mem.mem[a + 1] = {4'(NOP), 4'(GOTO), 8'h00};     // back to a
    pc_asm = a + 2;
  endfunction

  // ---------------------------------------------------------------------
  task automatic run(string name);
    int c = 0;
    rst_n = 1'b0;
    repeat (10) @(posedge clk);  // lets the memory finish a handshake
    rst_n = 1'b1;
    while (u_mem.mem[DONE_ADDR] != DONE_MARK && c < 20000) begin
      @(posedge clk);
      c++;
    end
    checks++;
    if (u_mem.mem[DONE_ADDR] != DONE_MARK) begin
      failures++;
      $display("FAIL %s: program did not finish", name);
    end else begin
      $display("%s: finished in %0d cycles", name, c);
    end
  endtask

  task automatic expect_mem(string what, int addr, logic [15:0] exp);
    checks++;
    if (u_mem.mem[addr] !== exp) begin
      failures++;
      $display("FAIL %s: mem[%h] = %h, expected %h", what, addr, u_mem.mem[addr], exp);
    end
  endtask

  task automatic expect_bits(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: translation is %0d bits, expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, a, b, c, tgt, skip_lbl;

    // ---- 2* : DUP +
    for (int k = 0; k < 4; k++) begin
      x = $urandom_range(16'hFFFF, 0);
      asm_start();
      lit16(x);
      bits = 0;
      op(DUP); op(ADD);
      expect_bits("2*", bits, 8);
      store_t(RES0);
      finish();
      run("2*");
      expect_mem("2*", RES0, 16'(x << 1));
    end

    // ---- DDROP : DROP DROP
    a = $urandom_range(16'hFFFF, 0); b = $urandom_range(16'hFFFF, 0); c = $urandom_range(16'hFFFF, 0);
    asm_start();
    lit16(a); lit16(b); lit16(c);
    bits = 0;
    op(DROP); op(DROP);
    expect_bits("DDROP", bits, 8);
    store_t(RES0);
    finish();
    run("DDROP");
    expect_mem("DDROP leaves the third item", RES0, 16'(a));

    // ---- OVER : >R DUP R> SWAP   ( a b -- a b a )
    a = $urandom_range(16'hFFFF, 0); b = $urandom_range(16'hFFFF, 0);
    asm_start();
    lit16(a); lit16(b);
    bits = 0;
    op(TOR); op(DUP); op(RTO); op(SWAP);
    expect_bits("OVER", bits, 16);
    store_t(RES0); store_t(RES0 + 1); store_t(RES0 + 2);
    finish();
    run("OVER");
    expect_mem("OVER top", RES0, 16'(a));
    expect_mem("OVER second", RES0 + 1, 16'(b));
    expect_mem("OVER third", RES0 + 2, 16'(a));

    // ---- EXIT : R> GOTO, as the return of a subroutine
    a = $urandom_range(16'hFFFF, 0);
    asm_start();
    lit16(a);
    tgt = 40;                      // subroutine at word 40
    call(tgt);
    op(DUP); op(ADD);              // runs after the return: T = 2a
    store_t(RES0);
    finish();
    pc_asm = tgt;                  // subroutine body: T := T + 1, EXIT
    lit_lo(1); op(ADD);
    bits = 0;
    op(RTO); op(GOTO);
    expect_bits("EXIT", bits, 8);
    flush_word();
    run("EXIT");
    expect_mem("EXIT returned after the CALL", RES0, 16'((a + 1) * 2));

    // ---- BRANCH : LIT hi, LIT lo XOR, GOTO
    a = $urandom_range(16'hFFFF, 0);
    asm_start();
    lit16(a);
    skip_lbl = 60;
    bits = 0;
    lit16(skip_lbl - 1); op(GOTO);
    expect_bits("BRANCH", bits, 40);
    lit16(POISON); store_t(RES0 + 1);  // must be jumped over
    finish();
    pc_asm = skip_lbl;
    store_t(RES0);
    finish();
    run("BRANCH");
    expect_mem("BRANCH target ran", RES0, 16'(a));
    expect_mem("BRANCH skipped code", RES0 + 1, 16'h0000);

    // ---- 0BRANCH : 0=, LIT hi, LIT lo XOR, AND, GOTO; flag zero and non-zero
    for (int flag = 0; flag < 2; flag++) begin
      a = $urandom_range(16'hFFFF, 0);
      asm_start();
      lit16(a);                                     // item under the flag
      lit16(flag ? $urandom_range(16'hFFFF, 1) : 0);
      skip_lbl = 80;
      bits = 0;
      op(ZEQ); lit16(skip_lbl - 1); op(AND); op(GOTO);
      expect_bits("0BRANCH", bits, 48);
      lit16(16'h0F0F); store_t(RES0 + 1);           // fall-through path
      store_t(RES0 + 3);                            // item under the flag
      finish();
      pc_asm = skip_lbl;
      lit16(16'h7A7A); store_t(RES0 + 2);           // branch path
      store_t(RES0 + 3);
      finish();
      run(flag ? "0BRANCH not taken" : "0BRANCH taken");
      if (flag == 0) begin
        expect_mem("0BRANCH taken: target ran", RES0 + 2, 16'h7A7A);
        expect_mem("0BRANCH taken: fall-through skipped", RES0 + 1, 16'h0000);
      end else begin
        expect_mem("0BRANCH not taken: fall-through ran", RES0 + 1, 16'h0F0F);
        expect_mem("0BRANCH not taken: target skipped", RES0 + 2, 16'h0000);
      end
      // in both cases the flag is consumed and the item below it is on top
      expect_mem("0BRANCH: item under the flag", RES0 + 3, 16'(a));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
