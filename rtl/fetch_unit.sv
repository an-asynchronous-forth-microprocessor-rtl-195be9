// fetch_unit: the fetch process together with its one-word holding register
// (JR). Whenever JR is empty it fetches the next word: it acquires the
// program-counter arbiter, then the memory arbiter, reads the word at
// wpc + 1 through the memory interface and advances the word PC ("inc"),
// then releases both. The word waits in JR until the instruction register
// takes it, so one word is prefetched while the current one executes.
//
// Two controls come from the execute unit. "flush" (a taken GOTO) discards
// a prefetched word; the execute unit raises it while it holds the
// program-counter arbiter, so no fetch is in flight then. JR pre-decodes
// bit 15: after fetching a CALL word it stops prefetching until the execute
// unit has written the call target to the PC and raises "call_resume",
// because a word fetched behind a CALL would come from the wrong place and
// would advance the return address.
//
// Arbiter requests are held from the first request until the memory
// interface reports completion (mem_done); grants are level signals.
module fetch_unit
  import msl16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // program-counter arbiter and word PC
  output logic              pc_r,
  input  logic              pc_g,
  input  logic [WPC_W-1:0]  wpc_next,
  output logic              wpc_inc,
  // memory arbiter and memory interface
  output logic              mem_r,
  input  logic              mem_g,
  output logic              mem_req,
  output logic [DATA_W-1:0] mem_addr,
  input  logic              mem_done,
  input  logic [DATA_W-1:0] mem_rdata,
  // to the instruction register
  output logic              inst_valid,
  output logic [DATA_W-1:0] inst_word,
  input  logic              inst_ready,
  // from the execute unit
  input  logic              flush,
  input  logic              call_resume
);
  typedef enum logic [1:0] {F_IDLE, F_PC, F_MEM, F_ACCESS} fstate_e;

  fstate_e           st;
  logic              jr_valid;
  logic [DATA_W-1:0] jr;
  logic              call_wait;

  always_comb begin
    pc_r       = (st != F_IDLE);
    mem_r      = (st == F_MEM) || (st == F_ACCESS);
    mem_req    = (st == F_ACCESS) && mem_g;
    mem_addr   = DATA_W'(wpc_next);
    wpc_inc    = (st == F_ACCESS) && mem_g && mem_done;
    inst_valid = jr_valid;
    inst_word  = jr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= F_IDLE;
      jr_valid  <= 1'b0;
      jr        <= '0;
      call_wait <= 1'b0;
    end else begin
      if (jr_valid && inst_ready) jr_valid <= 1'b0;
      if (call_resume)            call_wait <= 1'b0;
      unique case (st)
        F_IDLE:   if (!jr_valid && !call_wait && !flush) st <= F_PC;
        F_PC:     if (pc_g) st <= F_MEM;
        F_MEM:    if (mem_g) st <= F_ACCESS;
        F_ACCESS: if (mem_g && mem_done) begin
                    st       <= F_IDLE;
                    jr       <= mem_rdata;
                    jr_valid <= 1'b1;
                    if (mem_rdata[DATA_W-1]) call_wait <= 1'b1;
                  end
        default:  st <= F_IDLE;
      endcase
      if (flush) begin
        jr_valid  <= 1'b0;
        call_wait <= 1'b0;
      end
    end
  end

  // a flush only arrives while the execute unit owns the program counter
  flush_idle_a: assert property (@(posedge clk) disable iff (!rst_n)
                                 flush |-> (st == F_IDLE || st == F_PC));
endmodule
