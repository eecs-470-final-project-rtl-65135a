// lb: load buffer, LB_SZ (8) entries shared by both threads.
// A load is dispatched to both the reservation station and here. The reservation station
// issues it to an ALU, which computes the address and writes it into the entry. Every
// cycle the buffer takes, in round-robin order, one entry that has its address and asks its
// thread's store queue about the older stores: it waits, takes forwarded data, or, when
// no older store can matter, reads the data cache. A cache hit or forwarded word
// completes the load; a miss accepted by the cache's miss registers leaves the entry
// waiting for the fill of its line, which the cache broadcasts to every waiting load.
// A completed load puts its value (extracted and sign- or zero-extended by size) on the
// shared result bus; the entry is freed when the bus takes it. An lr.w also reserves its
// address for its thread at the moment it reads the cache (the line fill, on a miss). flush_i removes all entries of one thread.
module lb
  import cpu_pkg::*;
#(
  parameter int NS = 2
) (
  input  logic clk,
  input  logic rst,
  // dispatch
  input  logic  alloc_i     [NS],
  input  logic  alloc_tid_i [NS],
  input  dec_t  alloc_d_i   [NS],
  input  tag_t  alloc_dest_i[NS],
  input  logic [ROB_W-1:0] alloc_rob_i [NS],
  input  logic [SQ_W:0]    alloc_sqt_i [NS],
  output logic [LB_W-1:0]  alloc_idx_o [NS],
  output logic [$clog2(LB_SZ+1)-1:0] free_o,
  // address from the ALUs
  input  logic  addr_v_i [2],
  input  logic [LB_W-1:0] addr_idx_i [2],
  input  word_t addr_i   [2],
  // store queue query (to the querying thread's queue)
  output logic  q_valid_o,
  output logic  q_tid_o,
  output word_t q_addr_o,
  output logic [2:0] q_f3_o,
  output logic  q_lr_o,
  output logic [SQ_W:0] q_tail_o,
  input  logic  q_wait_i,
  input  logic  q_fwd_i,
  input  word_t q_word_i,
  // data cache
  output logic  dc_req_o,
  output word_t dc_addr_o,
  input  logic  dc_hit_i,
  input  logic  dc_acc_i,       // miss taken by the miss registers
  input  logic [63:0] dc_line_i,
  input  logic  fill_v_i,
  input  word_t fill_addr_i,
  input  logic [63:0] fill_line_i,
  // result bus
  output cdb_t  res_o,
  input  logic  grant_i,
  output logic  lr_o      [NT],  // an lr.w reads the cache: reserve lr_addr_o for the thread
  output word_t lr_addr_o [NT],
  input  logic  flush_i [NT]
);
  typedef enum logic [1:0] {S_ADDR, S_READY, S_MISS, S_DONE} st_t;
  typedef struct packed {
    logic  valid;
    st_t   st;
    logic  tid;
    tag_t  dest;
    logic [ROB_W-1:0] rob_idx;
    logic [2:0] f3;
    logic  lr;
    word_t addr;
    logic [SQ_W:0] sqt;
    word_t word;     // aligned memory word holding the loaded bytes
  } ent_t;

  ent_t ent [LB_SZ];
  logic pick_v;
  logic [LB_W-1:0] pick;
  logic done_v;
  logic [LB_W-1:0] done_i;
  logic [LB_W-1:0] rr;       // round-robin start of the query selector

  function automatic word_t extract(input word_t w, input logic [1:0] off, input logic [2:0] f3);
    word_t s;
    s = w >> (8 * off);
    unique case (f3)
      3'b000:  return {{24{s[7]}}, s[7:0]};
      3'b001:  return {{16{s[15]}}, s[15:0]};
      3'b100:  return {24'b0, s[7:0]};
      3'b101:  return {16'b0, s[15:0]};
      default: return s;
    endcase
  endfunction

  function automatic word_t line_word(input logic [63:0] l, input word_t a);
    return a[2] ? l[63:32] : l[31:0];
  endfunction

  always_comb begin
    logic [LB_SZ-1:0] used;
    used = '0;
    free_o = '0;
    for (int i = 0; i < LB_SZ; i++) begin
      used[i] = ent[i].valid;
      free_o = free_o + !ent[i].valid;
    end
    for (int s = 0; s < NS; s++) begin
      alloc_idx_o[s] = '0;
      for (int i = LB_SZ-1; i >= 0; i--) if (!used[i]) alloc_idx_o[s] = LB_W'(i);
      if (alloc_i[s]) used[alloc_idx_o[s]] = 1'b1;
    end
    pick_v = 1'b0; pick = '0; done_v = 1'b0; done_i = '0;
    for (int k = LB_SZ-1; k >= 0; k--) begin
      logic [LB_W-1:0] j;
      j = rr + LB_W'(k);
      if (ent[j].valid && ent[j].st == S_READY) begin pick_v = 1'b1; pick = j; end
    end
    for (int i = LB_SZ-1; i >= 0; i--) begin
      if (ent[i].valid && ent[i].st == S_DONE)  begin done_v = 1'b1; done_i = LB_W'(i); end
    end
    q_valid_o = pick_v;
    q_tid_o   = ent[pick].tid;
    q_addr_o  = ent[pick].addr;
    q_f3_o    = ent[pick].f3;
    q_lr_o    = ent[pick].lr;
    q_tail_o  = ent[pick].sqt;
    dc_req_o  = pick_v && !q_wait_i && !q_fwd_i;
    dc_addr_o = ent[pick].addr;

    res_o          = '0;
    res_o.valid    = done_v;
    res_o.tag      = ent[done_i].dest;
    res_o.has_dest = ent[done_i].dest.prn != '0;
    res_o.value    = extract(ent[done_i].word, ent[done_i].addr[1:0], ent[done_i].f3);
    res_o.rob_idx  = ent[done_i].rob_idx;
    // the reservation is taken when an lr.w gets its value from the cache
    for (int t = 0; t < NT; t++) begin
      lr_o[t] = 1'b0;
      lr_addr_o[t] = '0;
      if (pick_v && ent[pick].lr && ent[pick].tid == 1'(t) && !q_wait_i && !q_fwd_i && dc_hit_i) begin
        lr_o[t] = 1'b1; lr_addr_o[t] = ent[pick].addr;
      end
      for (int i = 0; i < LB_SZ; i++)
        if (fill_v_i && ent[i].valid && ent[i].st == S_MISS && ent[i].lr && ent[i].tid == 1'(t) &&
            ent[i].addr[31:3] == fill_addr_i[31:3]) begin
          lr_o[t] = 1'b1; lr_addr_o[t] = ent[i].addr;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LB_SZ; i++) ent[i] <= '0;
      rr <= '0;
    end else begin
      if (pick_v) rr <= pick + 1'b1;
      for (int a = 0; a < 2; a++)
        if (addr_v_i[a] && ent[addr_idx_i[a]].valid && ent[addr_idx_i[a]].st == S_ADDR) begin
          ent[addr_idx_i[a]].addr <= addr_i[a];
          ent[addr_idx_i[a]].st   <= S_READY;
        end
      if (pick_v) begin
        if (q_fwd_i) begin
          ent[pick].word <= q_word_i;
          ent[pick].st   <= S_DONE;
        end else if (!q_wait_i && dc_hit_i) begin
          ent[pick].word <= line_word(dc_line_i, ent[pick].addr);
          ent[pick].st   <= S_DONE;
        end else if (!q_wait_i && dc_acc_i) begin
          ent[pick].st   <= S_MISS;
        end
      end
      for (int i = 0; i < LB_SZ; i++)
        if (fill_v_i && ent[i].valid && ent[i].st == S_MISS &&
            ent[i].addr[31:3] == fill_addr_i[31:3]) begin
          ent[i].word <= line_word(fill_line_i, ent[i].addr);
          ent[i].st   <= S_DONE;
        end
      if (done_v && grant_i) ent[done_i].valid <= 1'b0;
      for (int i = 0; i < LB_SZ; i++)
        if (ent[i].valid && flush_i[ent[i].tid]) ent[i].valid <= 1'b0;
      for (int s = 0; s < NS; s++)
        if (alloc_i[s]) begin
          ent_t e;
          e = '0;
          e.valid = 1'b1;
          e.st    = S_ADDR;
          e.tid   = alloc_tid_i[s];
          e.dest  = alloc_dest_i[s];
          e.rob_idx = alloc_rob_i[s];
          e.f3    = alloc_d_i[s].funct3;
          e.lr    = alloc_d_i[s].is_lr;
          e.sqt   = alloc_sqt_i[s];
          ent[alloc_idx_o[s]] <= e;
        end
    end
  end
endmodule
