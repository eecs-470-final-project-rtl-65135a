// dispatch_arbiter: chooses which of the up to four decoded instructions (the two oldest
// of each thread) are dispatched this cycle, at most two in all.
// Each thread's instructions go in order (its second only with its first), and only if
// the structures they need have room: the thread's own reorder buffer, free list and
// store queue, and the shared reservation station and load buffer. When both threads
// have work it tries to dispatch one instruction from each; the thread that goes first
// in any tie alternates every such cycle so neither thread starves. A thread that is
// recovering from a misprediction (block_i) dispatches nothing.
// The selection order is this design's reading of the description; the resource counts
// come from the blocks they describe.
module dispatch_arbiter
  import cpu_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dec_t d_i       [NT][2],
  input  logic block_i   [NT],
  input  logic [ROB_W:0] rob_free_i [NT],
  input  logic [SQ_W:0]  sq_free_i  [NT],
  input  logic [$clog2(NPR+1)-1:0] fl_free_i [NT],
  input  logic [$clog2(RS_SZ+1)-1:0] rs_free_i,
  input  logic [$clog2(LB_SZ+1)-1:0] lb_free_i,
  output logic gnt_v_o   [2],
  output logic gnt_tid_o [2],
  output logic gnt_k_o   [2],        // which of the thread's two head instructions
  output logic [1:0] pop_o [NT],
  output logic both_o                // both threads dispatched this cycle
);
  logic prio;

  always_comb begin
    int rob_u [NT], sq_u [NT], fl_u [NT];
    int rs_u, lb_u, n;
    logic [1:0] nx [NT];          // next head index per thread
    logic       stop [NT];
    logic       cand_t [4];
    logic       cand_k [4];
    logic       multi;
    for (int t = 0; t < NT; t++) begin
      rob_u[t] = 0; sq_u[t] = 0; fl_u[t] = 0; nx[t] = '0; stop[t] = block_i[t]; pop_o[t] = '0;
    end
    rs_u = 0; lb_u = 0; n = 0;
    for (int s = 0; s < 2; s++) begin gnt_v_o[s] = 1'b0; gnt_tid_o[s] = 1'b0; gnt_k_o[s] = 1'b0; end
    multi = d_i[0][0].valid && d_i[1][0].valid && !block_i[0] && !block_i[1];
    // candidate order: first of each thread, then second of each thread
    cand_t[0] = prio;  cand_k[0] = 1'b0;
    cand_t[1] = !prio; cand_k[1] = 1'b0;
    cand_t[2] = prio;  cand_k[2] = 1'b1;
    cand_t[3] = !prio; cand_k[3] = 1'b1;
    for (int c = 0; c < 4; c++) begin
      logic t;
      dec_t d;
      logic need_rs, ok;
      t = cand_t[c];
      d = d_i[t][cand_k[c]];
      need_rs = (d.fu != FU_STORE) && !d.halt;
      ok = n < 2 && !stop[t] && d.valid && nx[t] == {1'b0, cand_k[c]} &&
           (rob_u[t] < int'(rob_free_i[t])) &&
           (!need_rs || rs_u < int'(rs_free_i)) &&
           (d.fu != FU_LOAD || lb_u < int'(lb_free_i)) &&
           (d.fu != FU_STORE || sq_u[t] < int'(sq_free_i[t])) &&
           (!d.has_dest || fl_u[t] < int'(fl_free_i[t]));
      if (ok) begin
        gnt_v_o[n] = 1'b1; gnt_tid_o[n] = t; gnt_k_o[n] = cand_k[c];
        n = n + 1;
        if (need_rs) rs_u++;
        if (d.fu == FU_LOAD) lb_u++;
        for (int u = 0; u < NT; u++) if (1'(u) == t) begin
          nx[u] = nx[u] + 1'b1;
          rob_u[u]++;
          if (d.fu == FU_STORE) sq_u[u]++;
          if (d.has_dest) fl_u[u]++;
        end
      end else begin
        for (int u = 0; u < NT; u++) if (1'(u) == t) stop[u] = 1'b1;
      end
    end
    for (int t = 0; t < NT; t++) pop_o[t] = nx[t];
    both_o = multi && nx[0] != 0 && nx[1] != 0;
  end

  always_ff @(posedge clk) begin
    if (rst) prio <= 1'b0;
    else if (d_i[0][0].valid && d_i[1][0].valid) prio <= ~prio;
  end
endmodule
