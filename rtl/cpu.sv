// cpu: two-thread simultaneous-multithreading, R10K-style out-of-order RV32IM core.
//
// Front end (per thread): fetch reads two instructions per cycle from the shared
// instruction cache (with victim cache and per-thread prefetching), predicts the next PC
// with the shared tournament predictor, branch target buffer and the thread's return
// address stack, and fills the thread's 16-entry instruction queue. Four decoders look
// at the two oldest instructions of each queue.
// Dispatch: the dispatch arbiter picks up to two of those four. Each is renamed through
// its thread's map table and free list (96 physical registers per thread, tags carry a
// thread bit), entered in its thread's 64-entry reorder buffer, and placed in the shared
// 16-entry reservation station (ALU, multiply, load), the shared 8-entry load buffer
// (loads) and/or its thread's 8-entry store queue (stores).
// Issue/execute: the reservation station issues up to two ALU-class and one multiply
// per cycle. Operands are read from the register files with a bypass from the result
// buses. ALUs finish in one cycle and own a result bus each (early tag broadcast gives
// back-to-back issue of dependent ALU instructions); loads use an ALU for their address;
// the 4-stage multiplier, the load buffer and the two store-conditional units share the
// third bus.
// Memory: loads go through store-to-load forwarding and the non-blocking 4-way data
// cache; committed stores drain from the store queues to the cache. One memory port is
// shared by the caches (data cache first).
// Retire: each reorder buffer retires up to two instructions per cycle (four in all),
// updating its retirement table and free list and training the predictors. A retiring
// mispredicted control-flow instruction recovers its thread only: map table and free
// list are rebuilt from the retirement table and every younger instruction of that
// thread is removed from all structures; the other thread keeps running.
// Both threads start at RESET_PC; csrr mhartid tells them apart. A thread stops when it
// retires wfi; halted_o shows which threads have stopped.
// Timing: one clock, synchronous active-high reset. Memory requests follow the course
// memory interface (a response tag in the cycle of the request, the data tag later).
// Sizes, widths, the two-thread split of structures and the pipeline organisation follow
// the design description; the encodings, the retire-time recovery detail, the CDB sharing
// order and the handling of lr/sc are this design's choices (see each block).
// Lint note: verilator reports "circular combinational logic" (UNOPTFLAT) on dc_ld_hit,
// q_valid/q_wait/q_fwd, st_ack, prf_rd and the fetch-side BTB outputs. Each is a request
// computed in one always_comb block of a sub-block whose answer comes back into the same
// block to decide registered state (load buffer <-> store queue / data cache, store queue
// <-> cache port arbiter, fetch <-> BTB). No bit depends on itself; the simulator only
// evaluates these blocks more than once per cycle.
module cpu
  import cpu_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic clk,
  input  logic rst,
  output mem_cmd_t proc2mem_command,
  output word_t    proc2mem_addr,
  output logic [63:0] proc2mem_data,
  input  logic [MEM_TAG_W-1:0] mem2proc_response,
  input  logic [63:0] mem2proc_data,
  input  logic [MEM_TAG_W-1:0] mem2proc_tag,
  output logic [NT-1:0] halted_o,
  output logic [31:0] retired_o [NT]
);
  // ---------------------------------------------------------------- thread control
  logic  flush [NT];
  word_t flush_pc [NT];
  logic  halted [NT];

  // ---------------------------------------------------------------- front end
  logic  ic_v [NT];  word_t ic_pc [NT];  logic ic_hit [NT];  logic [63:0] ic_line [NT];
  word_t bp_pc [4];  logic bp_tid [4];   logic bp_taken [4];
  word_t btb_pc [4]; logic btb_hit [4];  word_t btb_tgt [4];
  logic  f_v [NT][2]; fetch_pkt_t f_pkt [NT][2];
  logic  iq_room [NT]; logic iq_hv [NT][2]; fetch_pkt_t iq_h [NT][2];
  logic [1:0] pop [NT];
  dec_t  dec [NT][2];

  for (genvar t = 0; t < NT; t++) begin : g_front
    logic  ras_push, ras_pop, ras_empty;
    word_t ras_addr, ras_top;
    word_t bpc [2], btpc [2];
    logic  btk [2], bth [2];
    word_t btt [2];
    for (genvar k = 0; k < 2; k++) begin : g_k
      assign bp_pc[2*t+k]  = bpc[k];
      assign bp_tid[2*t+k] = 1'(t);
      assign btk[k]        = bp_taken[2*t+k];
      assign btb_pc[2*t+k] = btpc[k];
      assign bth[k]        = btb_hit[2*t+k];
      assign btt[k]        = btb_tgt[2*t+k];
      decoder u_dec (.valid_i(iq_hv[t][k]), .tid_i(1'(t)), .pkt_i(iq_h[t][k]), .dec_o(dec[t][k]));
    end
    fetch #(.RESET_PC(RESET_PC)) u_fetch (
      .clk, .rst, .redirect_i(flush[t]), .redirect_pc_i(flush_pc[t]),
      .ic_v_o(ic_v[t]), .ic_pc_o(ic_pc[t]), .ic_hit_i(ic_hit[t]), .ic_line_i(ic_line[t]),
      .bp_pc_o(bpc), .bp_taken_i(btk), .btb_pc_o(btpc), .btb_hit_i(bth), .btb_tgt_i(btt),
      .ras_push_o(ras_push), .ras_addr_o(ras_addr), .ras_pop_o(ras_pop),
      .ras_top_i(ras_top), .ras_empty_i(ras_empty),
      .iq_room_i(iq_room[t]), .out_v_o(f_v[t]), .out_o(f_pkt[t]), .stalled_o());
    ras u_ras (.clk, .rst, .push_i(ras_push), .push_addr_i(ras_addr), .pop_i(ras_pop),
               .top_o(ras_top), .empty_o(ras_empty));
    inst_queue u_iq (.clk, .rst, .flush_i(flush[t]), .push_i(f_v[t]), .push_pkt_i(f_pkt[t]),
                     .room_o(iq_room[t]), .head_v_o(iq_hv[t]), .head_o(iq_h[t]), .pop_i(pop[t]));
  end

  // predictor training from retirement
  logic  bpu_v [NT]; word_t bpu_pc [NT]; logic bpu_taken [NT];
  logic  btbu_v; word_t btbu_pc, btbu_tgt;

  tournament_bp u_bp (.clk, .rst, .pred_pc_i(bp_pc), .pred_tid_i(bp_tid), .pred_taken_o(bp_taken),
                      .upd_valid_i(bpu_v), .upd_pc_i(bpu_pc), .upd_taken_i(bpu_taken));
  btb u_btb (.clk, .rst, .lk_pc_i(btb_pc), .lk_hit_o(btb_hit), .lk_tgt_o(btb_tgt),
             .upd_valid_i(btbu_v), .upd_pc_i(btbu_pc), .upd_tgt_i(btbu_tgt));

  // ---------------------------------------------------------------- memory side
  logic  icm_req, icm_ack, pf_issue;  word_t icm_addr;
  logic  dcm_req, dcm_ack;  mem_cmd_t dcm_cmd;  word_t dcm_addr;  logic [63:0] dcm_data;

  icache u_icache (.clk, .rst, .rd_v_i(ic_v), .rd_pc_i(ic_pc), .hit_o(ic_hit), .line_o(ic_line),
                   .mem_req_o(icm_req), .mem_addr_o(icm_addr), .mem_ack_i(icm_ack),
                   .mem_tag_i(mem2proc_response), .mem_rtag_i(mem2proc_tag),
                   .mem_rdata_i(mem2proc_data), .pf_issue_o(pf_issue));

  mem_arbiter u_marb (.dc_req_i(dcm_req), .dc_cmd_i(dcm_cmd), .dc_addr_i(dcm_addr),
                      .dc_data_i(dcm_data), .dc_ack_o(dcm_ack), .ic_req_i(icm_req),
                      .ic_addr_i(icm_addr), .ic_ack_o(icm_ack), .mem_cmd_o(proc2mem_command),
                      .mem_addr_o(proc2mem_addr), .mem_data_o(proc2mem_data),
                      .mem_resp_i(mem2proc_response));

  // ---------------------------------------------------------------- dispatch
  logic [ROB_W:0] rob_free [NT];
  logic [SQ_W:0]  sq_free [NT], sq_tail [NT];
  logic [$clog2(NPR+1)-1:0] fl_cnt [NT];
  logic [$clog2(RS_SZ+1)-1:0] rs_free;
  logic [$clog2(LB_SZ+1)-1:0] lb_free;
  logic gnt_v [2], gnt_tid [2], gnt_k [2], disp_both;
  logic block [NT];
  dec_t sd [2];               // the packet in each dispatch slot

  always_comb for (int t = 0; t < NT; t++) block[t] = flush[t] || halted[t];

  dispatch_arbiter u_darb (.clk, .rst, .d_i(dec), .block_i(block), .rob_free_i(rob_free),
                           .sq_free_i(sq_free), .fl_free_i(fl_cnt), .rs_free_i(rs_free),
                           .lb_free_i(lb_free), .gnt_v_o(gnt_v), .gnt_tid_o(gnt_tid),
                           .gnt_k_o(gnt_k), .pop_o(pop), .both_o(disp_both));

  always_comb
    for (int s = 0; s < 2; s++) begin
      sd[s] = dec[gnt_tid[s]][gnt_k[s]];
      sd[s].valid = gnt_v[s];
    end

  // per-thread rename state, register files, reorder buffers, store queues
  prn_t  ren_src1 [NT][2], ren_src2 [NT][2];
  prn_t  new_prn [NT][2];      // per slot: the register this slot's instruction gets
  logic [ROB_W-1:0] rob_idx [NT][2];
  word_t prf_val [NT][10]; logic prf_rdy [NT][10];
  prn_t  prf_rd [10];
  cdb_t  bus [CDB_W];
  logic  st_ready [NT], head_sc [NT];
  logic  ret [NT][2], ret_dest [NT][2], ret_taken [NT][2], ret_store [NT][2];
  logic [4:0] ret_rd [NT][2];
  prn_t  ret_prn [NT][2];
  word_t ret_pc [NT][2], ret_npc [NT][2];
  cf_t   ret_cf [NT][2];
  logic  rob_halt [NT];

  // slot-level rename results
  tag_t  s_src1 [2], s_src2 [2], s_dest [2];
  logic  s_rdy1 [2], s_rdy2 [2];
  word_t s_val1 [2], s_val2 [2];
  logic [ROB_W-1:0] s_rob [2];

  // store queue <-> load buffer / data cache / lock
  logic  q_valid, q_tid, q_lr, q_wait [NT], q_fwd [NT];
  word_t q_addr, q_word [NT];
  logic [2:0] q_f3;
  logic [SQ_W:0] q_tail;
  logic  sq_dc_req [NT], sq_dc_ack [NT], sc_ok [NT], sc_done [NT], sc_grant [NT];
  word_t sq_dc_addr [NT], sq_dc_word [NT];
  logic [3:0] sq_dc_be [NT];
  cdb_t  sc_res [NT];

  for (genvar t = 0; t < NT; t++) begin : g_thr
    logic sv [2], hd [2], al [2], fl_take [2], sqd [2];
    logic [4:0] r1 [2], r2 [2], rdd [2];
    prn_t fl_prn [2], nprn [2];
    prn_t rrat_next [32], old_prn [2];
    logic ret_free [2];
    always_comb begin
      int j;
      j = 0;
      for (int s = 0; s < 2; s++) begin
        sv[s]  = gnt_v[s] && gnt_tid[s] == 1'(t);
        hd[s]  = sd[s].has_dest;
        r1[s]  = sd[s].rs1;
        r2[s]  = sd[s].rs2;
        rdd[s] = sd[s].rd;
        nprn[s] = fl_prn[j];
        al[s]  = sv[s] && hd[s];
        sqd[s] = sv[s] && sd[s].fu == FU_STORE;
        if (!al[s]) nprn[s] = '0;
        if (al[s]) j++;
      end
      for (int a = 0; a < 2; a++) fl_take[a] = a < j;
    end
    assign new_prn[t] = nprn;

    freelist u_fl (.clk, .rst, .alloc_prn_o(fl_prn), .alloc_ok_o(), .take_i(fl_take),
                   .free_i(ret_free), .free_prn_i(old_prn), .recover_i(flush[t]),
                   .rrat_i(rrat_next), .count_o(fl_cnt[t]));
    rat u_rat (.clk, .rst, .valid_i(sv), .rs1_i(r1), .rs2_i(r2), .rd_i(rdd), .has_dest_i(hd),
               .new_prn_i(nprn), .rs1_prn_o(ren_src1[t]), .rs2_prn_o(ren_src2[t]),
               .recover_i(flush[t]), .rrat_i(rrat_next));
    rrat u_rrat (.clk, .rst, .valid_i(ret_free), .rd_i(ret_rd[t]), .prn_i(ret_prn[t]),
                 .old_prn_o(old_prn), .map_next_o(rrat_next));
    always_comb for (int r = 0; r < 2; r++) ret_free[r] = ret[t][r] && ret_dest[t][r];

    prf #(.TID(1'(t)), .NRD(10), .NAL(2)) u_prf (.clk, .rst, .rd_prn_i(prf_rd),
               .rd_val_o(prf_val[t]), .rd_rdy_o(prf_rdy[t]), .cdb_i(bus),
               .alloc_i(al), .alloc_prn_i(nprn));

    logic [ROB_W-1:0] didx [2];
    logic [ROB_W-1:0] hidx;
    rob #(.TID(1'(t))) u_rob (.clk, .rst, .disp_i(sv), .disp_d_i(sd), .disp_prn_i(nprn),
               .disp_idx_o(didx), .free_o(rob_free[t]), .cdb_i(bus), .st_ready_i(st_ready[t]),
               .ret_o(ret[t]), .ret_dest_o(ret_dest[t]), .ret_rd_o(ret_rd[t]),
               .ret_prn_o(ret_prn[t]), .ret_pc_o(ret_pc[t]), .ret_cf_o(ret_cf[t]),
               .ret_taken_o(ret_taken[t]), .ret_npc_o(ret_npc[t]), .ret_store_o(ret_store[t]),
               .flush_o(flush[t]), .flush_pc_o(flush_pc[t]), .halt_o(rob_halt[t]),
               .head_sc_o(head_sc[t]), .head_idx_o(hidx), .empty_o());
    assign rob_idx[t] = didx;

    sq #(.TID(1'(t))) u_sq (.clk, .rst, .disp_i(sqd), .disp_d_i(sd), .disp_base_i(s_src1),
               .disp_data_i(s_src2), .disp_brdy_i(s_rdy1), .disp_bval_i(s_val1),
               .disp_drdy_i(s_rdy2), .disp_dval_i(s_val2), .disp_dest_i(s_dest),
               .disp_rob_i(s_rob), .tail_o(sq_tail[t]), .free_o(sq_free[t]), .cdb_i(bus),
               .st_ready_o(st_ready[t]), .commit_i(ret_store[t][0] || ret_store[t][1]),
               .rob_head_sc_i(head_sc[t]), .rob_head_idx_i(hidx),
               .q_valid_i(q_valid && q_tid == 1'(t)), .q_addr_i(q_addr), .q_f3_i(q_f3), .q_lr_i(q_lr),
               .q_tail_i(q_tail), .q_wait_o(q_wait[t]), .q_fwd_o(q_fwd[t]), .q_word_o(q_word[t]),
               .dc_req_o(sq_dc_req[t]), .dc_addr_o(sq_dc_addr[t]), .dc_word_o(sq_dc_word[t]),
               .dc_be_o(sq_dc_be[t]), .dc_ack_i(sq_dc_ack[t]), .sc_ok_i(sc_ok[t]),
               .sc_done_o(sc_done[t]), .sc_res_o(sc_res[t]), .sc_grant_i(sc_grant[t]),
               .flush_i(flush[t]));

    always_ff @(posedge clk) begin
      if (rst) begin
        halted[t] <= 1'b0;
        retired_o[t] <= '0;
      end else begin
        if (rob_halt[t]) halted[t] <= 1'b1;
        retired_o[t] <= retired_o[t] + 32'(ret[t][0]) + 32'(ret[t][1]);
      end
    end
    assign halted_o[t] = halted[t];
    assign bpu_v[t]     = (ret[t][0] && ret_cf[t][0] == CF_BR) || (ret[t][1] && ret_cf[t][1] == CF_BR);
    assign bpu_pc[t]    = (ret[t][0] && ret_cf[t][0] == CF_BR) ? ret_pc[t][0] : ret_pc[t][1];
    assign bpu_taken[t] = (ret[t][0] && ret_cf[t][0] == CF_BR) ? ret_taken[t][0] : ret_taken[t][1];
  end

  // branch target buffer training: a retiring jalr (thread 0 first)
  always_comb begin
    btbu_v = 1'b0; btbu_pc = '0; btbu_tgt = '0;
    for (int t = NT-1; t >= 0; t--)
      for (int r = 1; r >= 0; r--)
        if (ret[t][r] && ret_cf[t][r] == CF_JALR) begin
          btbu_v = 1'b1; btbu_pc = ret_pc[t][r]; btbu_tgt = ret_npc[t][r];
        end
  end

  // slot-level view of renaming (register file read ports 0..3 serve dispatch)
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic t, fw1, fw2;
      t = gnt_tid[s];
      s_src1[s] = '{tid: t, prn: ren_src1[t][s]};
      s_src2[s] = '{tid: t, prn: ren_src2[t][s]};
      s_dest[s] = '{tid: t, prn: new_prn[t][s]};
      s_rob[s]  = rob_idx[t][s];
      prf_rd[2*s]   = ren_src1[t][s];
      prf_rd[2*s+1] = ren_src2[t][s];
      // a source produced by the other slot of this cycle is never ready yet
      fw1 = s == 1 && gnt_v[0] && gnt_tid[0] == t && sd[0].has_dest && sd[0].rd == sd[1].rs1;
      fw2 = s == 1 && gnt_v[0] && gnt_tid[0] == t && sd[0].has_dest && sd[0].rd == sd[1].rs2;
      s_rdy1[s] = (prf_rdy[t][2*s]   && !fw1) || ren_src1[t][s] == '0;
      s_rdy2[s] = (prf_rdy[t][2*s+1] && !fw2) || ren_src2[t][s] == '0;
      s_val1[s] = prf_val[t][2*s];
      s_val2[s] = prf_val[t][2*s+1];
    end
  end

  // ---------------------------------------------------------------- reservation station
  logic rs_alloc [2], rs_tid [2], lb_alloc [2];
  logic [LB_W-1:0] lb_idx [2];
  logic [SQ_W:0] lb_sqt [2];
  fu_in_t iss_alu [2], iss_mul;
  tag_t   iss_a1 [2], iss_a2 [2], iss_m1, iss_m2;
  logic   mul_stall;

  always_comb
    for (int s = 0; s < 2; s++) begin
      logic t;
      t = gnt_tid[s];
      rs_alloc[s] = gnt_v[s] && sd[s].fu != FU_STORE && !sd[s].halt;
      rs_tid[s]   = t;
      lb_alloc[s] = gnt_v[s] && sd[s].fu == FU_LOAD;
      // stores dispatched in an earlier slot of the same thread are older than this load
      lb_sqt[s]   = sq_tail[t] + (SQ_W+1)'(s == 1 && gnt_v[0] && gnt_tid[0] == t &&
                                            sd[0].fu == FU_STORE);
    end

  rs u_rs (.clk, .rst, .alloc_i(rs_alloc), .alloc_tid_i(rs_tid), .alloc_d_i(sd),
           .alloc_dest_i(s_dest), .alloc_src1_i(s_src1), .alloc_src2_i(s_src2),
           .alloc_rdy1_i(s_rdy1), .alloc_rdy2_i(s_rdy2), .alloc_rob_i(s_rob),
           .alloc_lb_i(lb_idx), .free_o(rs_free), .cdb_i(bus), .mult_stall_i(mul_stall),
           .iss_alu_o(iss_alu), .iss_alu_src1_o(iss_a1), .iss_alu_src2_o(iss_a2),
           .iss_mul_o(iss_mul), .iss_mul_src1_o(iss_m1), .iss_mul_src2_o(iss_m2),
           .flush_i(flush));

  // operand read with result-bus bypass (register file read ports 4..9)
  function automatic word_t opnd(input tag_t tg, input word_t rf, input cdb_t b [CDB_W]);
    word_t v;
    v = rf;
    for (int c = 0; c < CDB_W; c++)
      if (b[c].valid && b[c].has_dest && b[c].tag == tg) v = b[c].value;
    return tg.prn == '0 ? '0 : v;
  endfunction

  fu_in_t alu_q [2], alu_nx [2], mul_in;
  always_comb begin
    prf_rd[4] = iss_a1[0].prn; prf_rd[5] = iss_a2[0].prn;
    prf_rd[6] = iss_a1[1].prn; prf_rd[7] = iss_a2[1].prn;
    prf_rd[8] = iss_m1.prn;    prf_rd[9] = iss_m2.prn;
    for (int k = 0; k < 2; k++) begin
      alu_nx[k]   = iss_alu[k];
      alu_nx[k].a = opnd(iss_a1[k], prf_val[iss_a1[k].tid][4+2*k], bus);
      alu_nx[k].b = opnd(iss_a2[k], prf_val[iss_a2[k].tid][5+2*k], bus);
    end
    mul_in   = iss_mul;
    mul_in.a = opnd(iss_m1, prf_val[iss_m1.tid][8], bus);
    mul_in.b = opnd(iss_m2, prf_val[iss_m2.tid][9], bus);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      alu_q[0] <= '0; alu_q[1] <= '0;
    end else begin
      for (int k = 0; k < 2; k++) begin
        alu_q[k] <= alu_nx[k];
        if (flush[alu_nx[k].tid]) alu_q[k].valid <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- execute
  cdb_t  alu_res [2], mul_res, lb_res;
  word_t alu_addr [2];
  logic  ld_addr_v [2];
  logic [LB_W-1:0] ld_addr_idx [2];
  logic  sh_grant [4];
  cdb_t  sh_req [4];

  for (genvar k = 0; k < 2; k++) begin : g_alu
    alu u_alu (.in_i(alu_q[k]), .res_o(alu_res[k]), .addr_o(alu_addr[k]));
    assign ld_addr_v[k]   = alu_q[k].valid && alu_q[k].d.fu == FU_LOAD;
    assign ld_addr_idx[k] = alu_q[k].lb_idx;
  end

  mult u_mult (.clk, .rst, .in_i(mul_in), .grant_i(sh_grant[0]), .flush_i(flush),
               .res_o(mul_res), .stall_o(mul_stall));

  assign sh_req[0] = mul_res;
  assign sh_req[1] = lb_res;
  assign sh_req[2] = sc_res[0];
  assign sh_req[3] = sc_res[1];
  assign sc_grant[0] = sh_grant[2];
  assign sc_grant[1] = sh_grant[3];

  cdb #(.NSH(4)) u_cdb (.clk, .rst, .alu_i(alu_res), .sh_i(sh_req), .sh_grant_o(sh_grant),
                        .bus_o(bus));

  // ---------------------------------------------------------------- loads and stores
  logic  dc_ld_req, dc_ld_hit, dc_ld_acc, fill_v, lr_v [NT];
  word_t dc_ld_addr, fill_addr, lr_addr [NT];
  logic [63:0] dc_ld_line, fill_line;
  logic  st_sel, st_req, st_ack;

  lb u_lb (.clk, .rst, .alloc_i(lb_alloc), .alloc_tid_i(rs_tid), .alloc_d_i(sd),
           .alloc_dest_i(s_dest), .alloc_rob_i(s_rob), .alloc_sqt_i(lb_sqt),
           .alloc_idx_o(lb_idx), .free_o(lb_free), .addr_v_i(ld_addr_v),
           .addr_idx_i(ld_addr_idx), .addr_i(alu_addr), .q_valid_o(q_valid), .q_tid_o(q_tid),
           .q_addr_o(q_addr), .q_f3_o(q_f3), .q_lr_o(q_lr), .q_tail_o(q_tail), .q_wait_i(q_wait[q_tid]),
           .q_fwd_i(q_fwd[q_tid]), .q_word_i(q_word[q_tid]), .dc_req_o(dc_ld_req),
           .dc_addr_o(dc_ld_addr), .dc_hit_i(dc_ld_hit), .dc_acc_i(dc_ld_acc),
           .dc_line_i(dc_ld_line), .fill_v_i(fill_v), .fill_addr_i(fill_addr),
           .fill_line_i(fill_line), .res_o(lb_res), .grant_i(sh_grant[1]), .lr_o(lr_v),
           .lr_addr_o(lr_addr), .flush_i(flush));

  // data cache store port: the two store queues take turns when both have a store
  logic st_turn;
  always_comb begin
    if (sq_dc_req[0] && sq_dc_req[1]) st_sel = st_turn;
    else st_sel = sq_dc_req[1];
    st_req = sq_dc_req[st_sel];
    for (int t = 0; t < NT; t++) sq_dc_ack[t] = st_ack && st_sel == 1'(t);
  end
  always_ff @(posedge clk)
    if (rst) st_turn <= 1'b0;
    else if (st_ack) st_turn <= ~st_sel;

  dcache u_dcache (.clk, .rst, .ld_req_i(dc_ld_req), .ld_addr_i(dc_ld_addr), .ld_hit_o(dc_ld_hit),
                   .ld_acc_o(dc_ld_acc), .ld_line_o(dc_ld_line), .st_req_i(st_req),
                   .st_addr_i(sq_dc_addr[st_sel]), .st_word_i(sq_dc_word[st_sel]),
                   .st_be_i(sq_dc_be[st_sel]), .st_ack_o(st_ack), .fill_v_o(fill_v),
                   .fill_addr_o(fill_addr), .fill_line_o(fill_line), .mem_req_o(dcm_req),
                   .mem_cmd_o(dcm_cmd), .mem_addr_o(dcm_addr), .mem_data_o(dcm_data),
                   .mem_ack_i(dcm_ack), .mem_tag_i(mem2proc_response), .mem_rtag_i(mem2proc_tag),
                   .mem_rdata_i(mem2proc_data));

  lock u_lock (.clk, .rst, .lr_i(lr_v), .lr_addr_i(lr_addr),
               .chk_addr_i(sq_dc_addr), .chk_ok_o(sc_ok), .done_i(sc_done), .flush_i(flush),
               .st_i(st_ack), .st_tid_i(st_sel), .st_addr_i(sq_dc_addr[st_sel]));
endmodule
