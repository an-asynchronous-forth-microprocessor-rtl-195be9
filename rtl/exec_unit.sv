// exec_unit: the execute process and the top-of-stack register T. It takes
// the instruction offered by the instruction register, carries it out and
// pulses e_done in the cycle it completes; e_skip with e_done tells the
// instruction register to drop the rest of the word (LIT in slot 0 or 1, a
// taken GOTO, a CALL).
//
// Instruction behaviour (T is the top of stack, DS the top of the data
// stack, RS the top of the return stack):
//   NOP                    nothing
//   AND XOR +              T := T op DS, pop DS         (ALU, variable time)
//   -                      T := DS - T, pop DS          (ALU, variable time)
//   2/ 0=                  T := T>>>1, T := (T==0 ? -1 : 0)   (ALU)
//   LIT slot 0             push T, T := low byte << 8, skip rest of word
//   LIT slot 1             push T, T := low byte, skip rest of word
//   LIT slot 2, 3          push T, T := processor status word (psw input)
//   DUP                    push T
//   DROP                   T := DS, pop DS
//   GOTO                   if T != 0: PC := T (continue at T+1), drop the
//                          prefetched word, skip rest of word; in both
//                          cases T := DS, pop DS
//   R>                     push T on DS, T := RS, pop RS
//   >R                     push T on RS, T := DS, pop DS
//   @                      T := mem[T]
//   !                      mem[DS] := T, T := DS, pop DS
//   SWAP                   exchange T and DS
//   CALL (bit 15 set)      push PC on RS, PC := bits 13..0 of the word,
//                          let the fetch unit resume, skip rest of word
// Simple instructions complete in the cycle they are offered. ALU
// instructions wait for the ALU's completion; @ and ! wait for the memory
// arbiter and the memory; GOTO (taken) and CALL wait for the program-counter
// arbiter, which guarantees that no fetch is in flight when the PC is
// rewritten. The GOTO condition is taken from a quick-decision zero checker
// on T. No instruction needs both arbiters, so the two cannot deadlock.
module exec_unit
  import msl16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // from the instruction register
  input  logic              e_valid,
  input  inst_t             e_inst,
  output logic              e_done,
  output logic              e_skip,
  // data stack
  output logic              ds_push,
  output logic              ds_pop,
  output logic [DATA_W-1:0] ds_din,
  input  logic [DATA_W-1:0] ds_top,
  // return stack
  output logic              rs_push,
  output logic              rs_pop,
  output logic [DATA_W-1:0] rs_din,
  input  logic [DATA_W-1:0] rs_top,
  // ALU
  output logic              alu_req,
  output alu_op_e           alu_op,
  output logic [DATA_W-1:0] alu_a,
  output logic [DATA_W-1:0] alu_b,
  input  logic              alu_busy,
  input  logic              alu_done,
  input  logic [DATA_W-1:0] alu_y,
  // memory arbiter and memory interface
  output logic              mem_r,
  input  logic              mem_g,
  output logic              mem_req,
  output logic              mem_we,
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_done,
  input  logic [DATA_W-1:0] mem_rdata,
  // program-counter arbiter and word PC
  output logic              pc_r,
  input  logic              pc_g,
  input  logic [WPC_W-1:0]  wpc_q,
  output logic              wpc_we,
  output logic [WPC_W-1:0]  wpc_wdata,
  // to the fetch unit
  output logic              flush,
  output logic              call_resume,
  // processor status word, loaded by LIT in slot 2 or 3
  input  logic [DATA_W-1:0] psw,
  // top of stack
  output logic [DATA_W-1:0] t
);
  typedef enum logic [1:0] {X_DISPATCH, X_ALU, X_MEM, X_PC} xstate_e;

  xstate_e           st;
  logic [DATA_W-1:0] t_n;
  logic              t_we;

  // GOTO condition: quick-decision zero checker on the dual-rail form of T
  logic [DATA_W-1:0] t_r1, t_r0;
  logic              t_nonzero, t_zero, t_valid;
  single_to_dual #(.W(DATA_W)) u_t_s2d (.d(t), .strobe(1'b1), .rail1(t_r1), .rail0(t_r0));
  zero_checker   #(.W(DATA_W)) u_t_zc  (.rail1(t_r1), .rail0(t_r0),
                                        .nonzero(t_nonzero), .zero(t_zero), .valid(t_valid));

  logic [7:0] lsb;
  logic       is_alu0, is_alu1;
  assign lsb     = e_inst.word[7:0];
  assign is_alu0 = !e_inst.call && (e_inst.op inside {OP_AND, OP_XOR, OP_ADD, OP_SUB});
  assign is_alu1 = !e_inst.call && (e_inst.op inside {OP_SHR, OP_ZEQ});

  always_comb begin
    unique case (e_inst.op)
      OP_AND:  alu_op = ALU_AND;
      OP_XOR:  alu_op = ALU_XOR;
      OP_ADD:  alu_op = ALU_ADD;
      OP_SUB:  alu_op = ALU_SUB;
      OP_SHR:  alu_op = ALU_SHR;
      default: alu_op = ALU_ZEQ;
    endcase
  end

  always_comb begin
    e_done      = 1'b0;
    e_skip      = 1'b0;
    ds_push     = 1'b0;
    ds_pop      = 1'b0;
    ds_din      = t;
    rs_push     = 1'b0;
    rs_pop      = 1'b0;
    rs_din      = t;
    alu_req     = 1'b0;
    alu_a       = t;
    alu_b       = ds_top;
    mem_r       = (st == X_MEM);
    mem_req     = (st == X_MEM) && mem_g;
    mem_we      = !e_inst.call && (e_inst.op == OP_ST);
    mem_addr    = mem_we ? ds_top : t;
    mem_wdata   = t;
    pc_r        = (st == X_PC);
    wpc_we      = 1'b0;
    wpc_wdata   = e_inst.call ? e_inst.word[WPC_W-1:0] : t[WPC_W-1:0];
    flush       = 1'b0;
    call_resume = 1'b0;
    t_n         = t;
    t_we        = 1'b0;

    unique case (st)
      X_DISPATCH: if (e_valid) begin
        if (e_inst.call) begin
          // handled in X_PC
        end else if (is_alu0 || is_alu1) begin
          alu_req = !alu_busy;
        end else begin
          unique case (e_inst.op)
            OP_NOP: e_done = 1'b1;
            OP_LIT: begin
              e_done  = 1'b1;
              ds_push = 1'b1;
              t_we    = 1'b1;
              unique case (e_inst.lpc)
                2'd0:    begin t_n = {lsb, 8'h00}; e_skip = 1'b1; end
                2'd1:    begin t_n = {8'h00, lsb}; e_skip = 1'b1; end
                default: t_n = psw;
              endcase
            end
            OP_DUP: begin e_done = 1'b1; ds_push = 1'b1; end
            OP_DROP: begin e_done = 1'b1; ds_pop = 1'b1; t_we = 1'b1; t_n = ds_top; end
            OP_GOTO: if (t_zero && t_valid) begin
              // not taken: the condition is consumed
              e_done = 1'b1; ds_pop = 1'b1; t_we = 1'b1; t_n = ds_top;
            end
            OP_RTO: begin
              e_done = 1'b1; ds_push = 1'b1; rs_pop = 1'b1; t_we = 1'b1; t_n = rs_top;
            end
            OP_TOR: begin
              e_done = 1'b1; rs_push = 1'b1; ds_pop = 1'b1; t_we = 1'b1; t_n = ds_top;
            end
            OP_SWAP: begin
              e_done = 1'b1; ds_push = 1'b1; ds_pop = 1'b1; t_we = 1'b1; t_n = ds_top;
            end
            default: ;  // @ and ! go to X_MEM
          endcase
        end
      end
      X_ALU: if (alu_done) begin
        e_done = 1'b1;
        t_we   = 1'b1;
        t_n    = alu_y;
        ds_pop = is_alu0;
      end
      X_MEM: if (mem_g && mem_done) begin
        e_done = 1'b1;
        t_we   = 1'b1;
        if (mem_we) begin
          t_n    = ds_top;
          ds_pop = 1'b1;
        end else begin
          t_n = mem_rdata;
        end
      end
      X_PC: if (pc_g) begin
        e_done = 1'b1;
        e_skip = 1'b1;
        wpc_we = 1'b1;
        if (e_inst.call) begin
          rs_push     = 1'b1;
          rs_din      = DATA_W'(wpc_q);
          call_resume = 1'b1;
        end else begin
          flush  = 1'b1;
          ds_pop = 1'b1;
          t_we   = 1'b1;
          t_n    = ds_top;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= X_DISPATCH;
      t  <= '0;
    end else begin
      if (t_we) t <= t_n;
      unique case (st)
        X_DISPATCH: if (e_valid) begin
          if (e_inst.call)                               st <= X_PC;
          else if ((is_alu0 || is_alu1) && !alu_busy)    st <= X_ALU;
          else if (e_inst.op == OP_AT || e_inst.op == OP_ST) st <= X_MEM;
          else if (e_inst.op == OP_GOTO && t_nonzero)    st <= X_PC;
        end
        X_ALU: if (alu_done) st <= X_DISPATCH;
        X_MEM: if (mem_g && mem_done) st <= X_DISPATCH;
        X_PC:  if (pc_g) st <= X_DISPATCH;
        default: st <= X_DISPATCH;
      endcase
    end
  end

  zero_test_a: assert property (@(posedge clk) disable iff (!rst_n) t_nonzero != t_zero);
endmodule
