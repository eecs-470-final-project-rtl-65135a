// tb_rob: self-checking random test of one thread's reorder buffer (thread 0, two
// dispatch slots, two retire slots) against a queue model kept in the testbench.
// Each cycle the bench dispatches 0-2 instructions (ALU, branch, store), completes up to
// three random unfinished ones through the result buses in any order (a branch is
// sometimes marked mispredicted with a new next PC), and randomly reports that the oldest
// store is resolved. It checks every cycle: the dispatch indices, the free count, which
// instructions retire (in order, only when done, at most two, stopping after a branch or
// a store), their PCs and store flags, and that a mispredicted branch flushes with its
// next PC and empties the buffer. The peak rate of two retirements per cycle must occur,
// as must flushes, store retirements and a full buffer. Prints TB_RESULT; has a watchdog.
module tb_rob;
  import cpu_pkg::*;
  localparam int NS = 2, NR = 2;
  logic clk = 0, rst = 1;
  logic disp [NS], st_ready, flush, halt, head_sc, empty;
  dec_t d [NS];
  prn_t prn [NS];
  logic [ROB_W-1:0] didx [NS], head_idx;
  logic [ROB_W:0] free;
  cdb_t cdb [CDB_W];
  logic ret [NR], rdest [NR], rtaken [NR], rstore [NR];
  logic [4:0] rrd [NR];
  prn_t rprn [NR];
  word_t rpc [NR], rnpc [NR], fpc;
  cf_t rcf [NR];
  int checks = 0, failures = 0, n_two = 0, n_flush = 0, n_store = 0, n_full = 0, n_ret = 0;

  rob dut (.clk, .rst, .disp_i(disp), .disp_d_i(d), .disp_prn_i(prn),
    .disp_idx_o(didx), .free_o(free), .cdb_i(cdb), .st_ready_i(st_ready), .ret_o(ret),
    .ret_dest_o(rdest), .ret_rd_o(rrd), .ret_prn_o(rprn), .ret_pc_o(rpc), .ret_cf_o(rcf),
    .ret_taken_o(rtaken), .ret_npc_o(rnpc), .ret_store_o(rstore), .flush_o(flush),
    .flush_pc_o(fpc), .halt_o(halt), .head_sc_o(head_sc), .head_idx_o(head_idx), .empty_o(empty));
  always #5 clk = ~clk;
  initial begin #2000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask

  typedef struct { word_t pc; int kind; bit done; bit mp; word_t npc; logic [ROB_W-1:0] idx; } m_t;
  localparam int K_ALU = 0, K_BR = 1, K_ST = 2;
  m_t q [$];
  logic [ROB_W-1:0] mtail;
  word_t pc_next;

  initial begin
    int nd, nret_e, nc, pick;
    bit stop, fl_e;
    word_t fpc_e;
    m_t nw [NS];
    int done_now [$];
    disp = '{0, 0}; d = '{default: '0}; prn = '{default: '0}; cdb = '{default: '0}; st_ready = 0;
    mtail = '0; pc_next = 32'h1000;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // inputs for this cycle
      // fill the buffer during the first 200 cycles, then run at random
      nd = (cyc < 200) ? 2 : $urandom_range(0, 2);
      if (int'(free) < nd) nd = int'(free);
      for (int s = 0; s < NS; s++) begin
        disp[s] = s < nd;
        d[s] = '0; d[s].valid = 1; d[s].pc = pc_next + 32'(4 * s);
        nw[s].kind = $urandom_range(0, 9) < 7 ? K_ALU : ($urandom_range(0, 1) ? K_BR : K_ST);
        d[s].fu = nw[s].kind == K_ST ? FU_STORE : FU_ALU;
        d[s].cf = nw[s].kind == K_BR ? CF_BR : CF_NONE;
        d[s].has_dest = nw[s].kind == K_ALU; d[s].rd = 5'(s + 1);
        prn[s] = 7'(cyc % 96);
        nw[s].pc = d[s].pc; nw[s].done = 0; nw[s].mp = 0; nw[s].npc = d[s].pc + 4;
        nw[s].idx = mtail + ROB_W'(s);
      end
      cdb = '{default: '0};
      done_now = {};
      nc = 0;
      if (cyc >= 150)
        for (int c = 0; c < CDB_W; c++) begin
          pick = $urandom_range(0, 15);
          if (pick < q.size() && !q[pick].done && q[pick].kind != K_ST && !(pick inside {done_now})) begin
            cdb[c].valid = 1; cdb[c].tag = '{1'b0, 7'd1}; cdb[c].has_dest = 1;
            cdb[c].rob_idx = q[pick].idx;
            cdb[c].mispred = q[pick].kind == K_BR && $urandom_range(0, 7) == 0;
            cdb[c].npc = cdb[c].mispred ? 32'h8000 + 32'(cyc) : q[pick].pc + 4;
            cdb[c].taken = cdb[c].mispred;
            done_now.push_back(pick);
          end
        end
      st_ready = $urandom_range(0, 1);
      #1;
      // expected outputs
      chk("free", 32'(free), 32'(ROB_SZ - q.size()));
      chk("empty", 32'(empty), 32'(q.size() == 0));
      if (q.size() == ROB_SZ) n_full++;
      for (int s = 0; s < NS; s++) chk("dispatch index", 32'(didx[s]), 32'(ROB_W'(mtail + ROB_W'(s < nd ? s : nd))));
      stop = 0; nret_e = 0; fl_e = 0; fpc_e = '0;
      for (int r = 0; r < NR; r++) begin
        bit go;
        go = !stop && r < q.size() && (q[r].done || (q[r].kind == K_ST && st_ready));
        chk("retire", 32'(ret[r]), 32'(go));
        if (go) begin
          nret_e++;
          chk("retire pc", rpc[r], q[r].pc);
          chk("retire store", 32'(rstore[r]), 32'(q[r].kind == K_ST));
          if (q[r].kind == K_ST) n_store++;
          if (q[r].kind != K_ALU) stop = 1;
          if (q[r].kind == K_BR && q[r].mp) begin fl_e = 1; fpc_e = q[r].npc; end
        end else stop = 1;
      end
      chk("flush", 32'(flush), 32'(fl_e));
      if (fl_e) chk("flush pc", fpc, fpc_e);
      if (nret_e == 2) n_two++;
      n_ret += nret_e;
      if (fl_e) n_flush++;
      @(posedge clk);
      // update the model as the buffer did on this edge
      foreach (done_now[i]) begin
        int j; j = done_now[i];
        q[j].done = 1;
        for (int c = 0; c < CDB_W; c++)
          if (cdb[c].valid && cdb[c].rob_idx == q[j].idx) begin q[j].mp = cdb[c].mispred; q[j].npc = cdb[c].npc; end
      end
      if (fl_e) begin
        q = {}; mtail = '0;
      end else begin
        repeat (nret_e) void'(q.pop_front());
        for (int s = 0; s < nd; s++) q.push_back(nw[s]);
        mtail = mtail + ROB_W'(nd);
      end
      pc_next = pc_next + 32'(4 * NS);
      #1;
      disp = '{0, 0};
    end
    $display("retired=%0d two_per_cycle=%0d flushes=%0d stores=%0d full_cycles=%0d", n_ret, n_two, n_flush, n_store, n_full);
    chk("two retirements in a cycle happened", 32'(n_two > 0), 1);
    chk("flushes happened", 32'(n_flush > 0), 1);
    chk("store retirements happened", 32'(n_store > 0), 1);
    chk("buffer became full", 32'(n_full > 0), 1);
    chk("work retired", 32'(n_ret > 1000), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
