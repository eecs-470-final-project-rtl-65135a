// sq: store queue of one thread, SQ_SZ (8) entries in program order.
// Stores do not enter the reservation station: dispatch appends them at the tail with the
// tags of their base and data registers, and the queue collects the two values from the
// register file or, later, from the result buses. Once both are known the store is
// resolved, which lets the reorder buffer retire it; retirement marks it committed, and
// only committed stores at the head are written to the data cache, so memory never
// changes speculatively and stores reach it strictly in order.
// Loads ask the queue about the stores that were ahead of them at dispatch (q_tail_i is
// the tail pointer the load saw). If one of those has an unknown address, or the
// youngest one that overlaps the load does not cover it completely or lacks its data,
// the load must wait; if that youngest overlapping store covers the load, its data is
// forwarded; otherwise the load may read the cache. Two extra rules keep locks correct:
// no load passes an older sc.w, and an lr.w waits until every older store has left the
// queue, so it always reads the cache (these ordering rules are this design's choice).
// sc.w also lives here: when it is the oldest instruction of the thread and nothing older
// is left in the queue, it asks the lock whether its reservation still holds, writes the
// cache only if so, and reports 0 (success) or 1 on the shared result bus.
// Accesses are assumed naturally aligned. On a misprediction (flush_i) every store that
// has not been committed is dropped.
module sq
  import cpu_pkg::*;
#(
  parameter logic TID = 1'b0,
  parameter int   NS  = 2
) (
  input  logic clk,
  input  logic rst,
  // dispatch
  input  logic  disp_i     [NS],
  input  dec_t  disp_d_i   [NS],
  input  tag_t  disp_base_i[NS],
  input  tag_t  disp_data_i[NS],
  input  logic  disp_brdy_i[NS],
  input  word_t disp_bval_i[NS],
  input  logic  disp_drdy_i[NS],
  input  word_t disp_dval_i[NS],
  input  tag_t  disp_dest_i[NS],
  input  logic [ROB_W-1:0] disp_rob_i [NS],
  output logic [SQ_W:0] tail_o,        // pointer (with wrap bit) loads record at dispatch
  output logic [SQ_W:0] free_o,
  input  cdb_t  cdb_i [CDB_W],
  // reorder buffer
  output logic  st_ready_o,            // oldest uncommitted store is resolved
  input  logic  commit_i,              // it retired
  input  logic  rob_head_sc_i,
  input  logic [ROB_W-1:0] rob_head_idx_i,
  // load query
  input  logic  q_valid_i,
  input  word_t q_addr_i,
  input  logic [2:0] q_f3_i,
  input  logic  q_lr_i,                // the load is an lr.w
  input  logic [SQ_W:0] q_tail_i,
  output logic  q_wait_o,
  output logic  q_fwd_o,
  output word_t q_word_o,              // forwarded aligned word
  // data cache write
  output logic  dc_req_o,
  output word_t dc_addr_o,
  output word_t dc_word_o,             // aligned word
  output logic [3:0] dc_be_o,
  input  logic  dc_ack_i,
  // sc.w
  input  logic  sc_ok_i,               // lock: reservation holds for dc_addr_o
  output logic  sc_done_o,             // the sc.w executed this cycle
  output cdb_t  sc_res_o,
  input  logic  sc_grant_i,
  input  logic  flush_i
);
  typedef struct packed {
    logic  sc;
    logic [2:0] f3;
    word_t imm;
    tag_t  btag, dtag;
    logic  brdy, drdy;
    word_t bval, dval;
    tag_t  dest;
    logic [ROB_W-1:0] rob_idx;
  } ent_t;

  ent_t ent [SQ_SZ];
  logic [SQ_W:0] head, cmt, tail;   // cmt: oldest uncommitted
  cdb_t sc_q;

  function automatic logic [3:0] bmask(input logic [2:0] f3, input logic [1:0] off);
    unique case (f3[1:0])
      2'b00:   return 4'b0001 << off;
      2'b01:   return 4'b0011 << off;
      default: return 4'b1111;
    endcase
  endfunction

  function automatic logic resolved(input ent_t e);
    return e.brdy && e.drdy;
  endfunction

  function automatic word_t eaddr(input ent_t e);
    return e.bval + e.imm;
  endfunction

  assign tail_o   = tail;
  assign free_o   = (SQ_W+1)'(SQ_SZ) - (tail - head);
  assign st_ready_o = (cmt != tail) && !ent[cmt[SQ_W-1:0]].sc && resolved(ent[cmt[SQ_W-1:0]]);

  // load query
  always_comb begin
    logic [SQ_W:0] n;
    logic decided;
    ent_t e;
    logic [3:0] lm, sm;
    e = '0; lm = '0; sm = '0;
    q_wait_o = 1'b0;
    q_fwd_o  = 1'b0;
    q_word_o = '0;
    decided  = 1'b0;
    n = q_tail_i - head;                       // stores still ahead of the load
    for (int k = SQ_SZ-1; k >= 0; k--) begin   // youngest first
      if ((SQ_W+1)'(k) < n) begin
        e  = ent[SQ_W'(head + (SQ_W+1)'(k))];
        lm = bmask(q_f3_i, q_addr_i[1:0]);
        sm = bmask(e.f3, eaddr(e)[1:0]);
        if (!e.brdy || e.sc || q_lr_i) q_wait_o = 1'b1;
        else if (!decided && eaddr(e)[31:2] == q_addr_i[31:2] && (lm & sm) != 0) begin
          decided = 1'b1;
          if ((lm & ~sm) == 0 && e.drdy) begin
            q_fwd_o  = 1'b1;
            q_word_o = e.dval << (8 * eaddr(e)[1:0]);
          end else q_wait_o = 1'b1;
        end
      end
    end
    if (!q_valid_i) q_wait_o = 1'b0;
    if (q_wait_o || !q_valid_i) q_fwd_o = 1'b0;
  end

  // data cache write port: committed head store, or an sc.w ready to run
  logic head_st, head_sc;
  ent_t h;
  always_comb begin
    h = ent[head[SQ_W-1:0]];
    head_st = (head != cmt) && !h.sc;
    head_sc = (head == cmt) && (head != tail) && h.sc && resolved(h) && rob_head_sc_i &&
              h.rob_idx == rob_head_idx_i &&
              !sc_q.valid;
    sc_done_o = head_sc && (!sc_ok_i || dc_ack_i);
    dc_req_o  = head_st || (head_sc && sc_ok_i);
    dc_addr_o = eaddr(h);
    dc_word_o = h.dval << (8 * eaddr(h)[1:0]);
    dc_be_o   = bmask(h.f3, eaddr(h)[1:0]);
  end
  assign sc_res_o = sc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0; cmt <= '0; tail <= '0;
      sc_q <= '0;
    end else begin
      logic [SQ_W:0] t;
      // operand capture
      for (int i = 0; i < SQ_SZ; i++)
        for (int c = 0; c < CDB_W; c++)
          if (cdb_i[c].valid && cdb_i[c].has_dest) begin
            if (!ent[i].brdy && cdb_i[c].tag == ent[i].btag) begin
              ent[i].brdy <= 1'b1; ent[i].bval <= cdb_i[c].value;
            end
            if (!ent[i].drdy && cdb_i[c].tag == ent[i].dtag) begin
              ent[i].drdy <= 1'b1; ent[i].dval <= cdb_i[c].value;
            end
          end
      // dispatch
      t = tail;
      for (int s = 0; s < NS; s++)
        if (disp_i[s]) begin
          ent_t e;
          e.sc   = disp_d_i[s].is_sc;
          e.f3   = disp_d_i[s].funct3;
          e.imm  = disp_d_i[s].is_sc ? '0 : disp_d_i[s].imm;
          e.btag = disp_base_i[s];
          e.dtag = disp_data_i[s];
          e.brdy = disp_brdy_i[s];
          e.bval = disp_bval_i[s];
          e.drdy = disp_drdy_i[s];
          e.dval = disp_dval_i[s];
          e.dest = disp_dest_i[s];
          e.rob_idx = disp_rob_i[s];
          for (int c = 0; c < CDB_W; c++)
            if (cdb_i[c].valid && cdb_i[c].has_dest) begin
              if (!e.brdy && cdb_i[c].tag == e.btag) begin e.brdy = 1'b1; e.bval = cdb_i[c].value; end
              if (!e.drdy && cdb_i[c].tag == e.dtag) begin e.drdy = 1'b1; e.dval = cdb_i[c].value; end
            end
          ent[t[SQ_W-1:0]] <= e;
          t = t + 1'b1;
        end
      tail <= t;
      if (commit_i) cmt <= cmt + 1'b1;
      // write the head store
      if (head_st && dc_ack_i) head <= head + 1'b1;
      // sc.w: fail at once, or succeed when the cache takes the write
      if (head_sc && (!sc_ok_i || dc_ack_i)) begin
        head <= head + 1'b1;
        cmt  <= cmt + 1'b1;
        sc_q.valid    <= 1'b1;
        sc_q.tag      <= h.dest;
        sc_q.has_dest <= h.dest.prn != '0;
        sc_q.value    <= sc_ok_i ? 32'd0 : 32'd1;
        sc_q.rob_idx  <= h.rob_idx;
        sc_q.npc      <= '0;
      end
      if (sc_q.valid && sc_grant_i) sc_q.valid <= 1'b0;
      if (flush_i) begin
        tail <= commit_i ? cmt + 1'b1 : cmt;
        sc_q.valid <= 1'b0;
      end
    end
  end
endmodule
