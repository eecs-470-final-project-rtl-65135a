// rob: reorder buffer of one thread, a circular buffer of ROB_SZ (64) entries.
// Dispatch appends up to NS instructions per cycle at the tail. Results come from the
// result buses (entries whose thread matches TID); plain stores instead complete when
// the store queue reports that the oldest uncommitted store has its address and data
// (st_ready_i); wfi completes at dispatch. Up to NR completed instructions retire per
// cycle from the head, in order, handing their destination to the retirement table.
// Retirement stops after a control-flow instruction (so at most one branch per cycle
// trains the predictors), after one store, and at wfi, which halts the thread.
// A retiring control-flow instruction whose outcome differs from the prediction makes
// the thread recover: flush_o for one cycle with the correct next PC; the buffer empties
// and all younger work of the thread is discarded everywhere.
module rob
  import cpu_pkg::*;
#(
  parameter logic TID = 1'b0,
  parameter int   NS  = 2,
  parameter int   NR  = 2
) (
  input  logic clk,
  input  logic rst,
  // dispatch
  input  logic  disp_i      [NS],
  input  dec_t  disp_d_i    [NS],
  input  prn_t  disp_prn_i  [NS],
  output logic [ROB_W-1:0] disp_idx_o [NS],
  output logic [ROB_W:0]   free_o,
  // completion
  input  cdb_t  cdb_i [CDB_W],
  input  logic  st_ready_i,          // oldest uncommitted store is resolved
  // retirement
  output logic  ret_o      [NR],
  output logic  ret_dest_o [NR],
  output logic [4:0] ret_rd_o [NR],
  output prn_t  ret_prn_o  [NR],
  output word_t ret_pc_o   [NR],
  output cf_t   ret_cf_o   [NR],
  output logic  ret_taken_o[NR],
  output word_t ret_npc_o  [NR],
  output logic  ret_store_o[NR],     // a plain store retired: commit it in the store queue
  output logic  flush_o,
  output word_t flush_pc_o,
  output logic  halt_o,              // wfi retired this cycle
  output logic  head_sc_o,           // oldest instruction is an sc.w that has not run
  output logic [ROB_W-1:0] head_idx_o,
  output logic  empty_o
);
  typedef struct packed {
    logic  done;
    logic  dest;
    logic [4:0] rd;
    prn_t  prn;
    word_t pc;
    cf_t   cf;
    logic  store;    // plain store
    logic  sc;
    logic  halt;
    logic  mispred;
    logic  taken;
    word_t npc;
  } ent_t;

  ent_t ent [ROB_SZ];
  logic [ROB_W-1:0] head, tail;
  logic [ROB_W:0]   cnt;
  logic [ROB_W:0]   nret;
  logic [ROB_W:0]   ndisp;

  assign free_o     = (ROB_W+1)'(ROB_SZ) - cnt;
  assign head_idx_o = head;
  assign empty_o    = (cnt == 0);
  assign head_sc_o  = (cnt != 0) && ent[head].sc && !ent[head].done;

  always_comb begin
    logic [ROB_W-1:0] t;
    t = tail;
    ndisp = '0;
    for (int s = 0; s < NS; s++) begin
      disp_idx_o[s] = t;
      if (disp_i[s]) begin
        t = t + 1'b1;
        ndisp = ndisp + 1'b1;
      end
    end
  end

  always_comb begin
    logic stop;
    logic [ROB_W-1:0] h;
    stop = 1'b0;
    nret = '0;
    flush_o = 1'b0;
    flush_pc_o = '0;
    halt_o = 1'b0;
    for (int r = 0; r < NR; r++) begin
      ent_t e;
      h = head + ROB_W'(r);
      e = ent[h];
      ret_o[r] = 1'b0;
      ret_dest_o[r] = e.dest;
      ret_rd_o[r]   = e.rd;
      ret_prn_o[r]  = e.prn;
      ret_pc_o[r]   = e.pc;
      ret_cf_o[r]   = e.cf;
      ret_taken_o[r] = e.taken;
      ret_npc_o[r]  = e.npc;
      ret_store_o[r] = 1'b0;
      if (!stop && (ROB_W+1)'(r) < cnt && (e.done || (e.store && st_ready_i))) begin
        ret_o[r] = 1'b1;
        ret_store_o[r] = e.store;
        nret = nret + 1'b1;
        if (e.cf != CF_NONE || e.store || e.halt) stop = 1'b1;
        if (e.halt) halt_o = 1'b1;
        if (e.cf != CF_NONE && e.mispred) begin
          flush_o = 1'b1;
          flush_pc_o = e.npc;
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush_o) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
    end else begin
      for (int s = 0; s < NS; s++)
        if (disp_i[s]) begin
          ent_t e;
          e = '0;
          e.dest  = disp_d_i[s].has_dest;
          e.rd    = disp_d_i[s].rd;
          e.prn   = disp_prn_i[s];
          e.pc    = disp_d_i[s].pc;
          e.cf    = disp_d_i[s].cf;
          e.store = disp_d_i[s].fu == FU_STORE && !disp_d_i[s].is_sc;
          e.sc    = disp_d_i[s].is_sc;
          e.halt  = disp_d_i[s].halt;
          e.done  = disp_d_i[s].halt;
          e.npc   = disp_d_i[s].pc + 32'd4;
          ent[disp_idx_o[s]] <= e;
        end
      for (int c = 0; c < CDB_W; c++)
        if (cdb_i[c].valid && cdb_i[c].tag.tid == TID) begin
          ent[cdb_i[c].rob_idx].done    <= 1'b1;
          ent[cdb_i[c].rob_idx].mispred <= cdb_i[c].mispred;
          ent[cdb_i[c].rob_idx].taken   <= cdb_i[c].taken;
          ent[cdb_i[c].rob_idx].npc     <= cdb_i[c].npc;
        end
      head <= head + nret[ROB_W-1:0];
      tail <= tail + ndisp[ROB_W-1:0];
      cnt  <= cnt + ndisp - nret;
    end
  end
endmodule
