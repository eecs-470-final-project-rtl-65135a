// tournament_bp: tournament conditional-branch predictor.
// Two component predictors of 2-bit saturating counters:
//   local : a 256-line local history table (8 history bits per line, indexed by PC[9:2])
//           whose history selects one of 256 counters; counters start weakly not taken.
//   gshare: 256 counters indexed by PC[9:2] XOR the 8-bit global history; counters start
//           weakly taken.
// A table of 32 2-bit selectors (indexed by PC[6:2], starting weakly global) picks which
// component's prediction to use. These sizes and initial states follow the design
// description. All tables are updated when a conditional branch retires; a selector
// moves only when the two components disagreed, towards the one that was right.
// Prediction is combinational (NP read ports for the fetch slots). Each thread keeps its
// own global history register, which is this design's choice; update port u belongs to
// thread u. Reset initialises every table, which takes one cycle.
module tournament_bp
  import cpu_pkg::*;
#(
  parameter int LOCAL_LINES  = 256,
  parameter int LHIST_W      = 8,
  parameter int GSHARE_LINES = 256,
  parameter int GHIST_W      = 8,
  parameter int SEL_LINES    = 32,
  parameter int NP           = 4,   // prediction ports
  parameter int NU           = NT   // update ports, one per thread
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t pred_pc_i  [NP],
  input  logic  pred_tid_i [NP],
  output logic  pred_taken_o [NP],
  input  logic  upd_valid_i [NU],
  input  word_t upd_pc_i    [NU],
  input  logic  upd_taken_i [NU]
);
  localparam int LI_W = $clog2(LOCAL_LINES);
  localparam int GI_W = $clog2(GSHARE_LINES);
  localparam int SI_W = $clog2(SEL_LINES);

  logic [LHIST_W-1:0] lht  [LOCAL_LINES];
  logic [1:0]         lpht [2**LHIST_W];
  logic [1:0]         gpht [GSHARE_LINES];
  logic [1:0]         sel  [SEL_LINES];
  logic [GHIST_W-1:0] ghr  [NU];

  function automatic logic [GI_W-1:0] gidx(input word_t pc, input logic [GHIST_W-1:0] h);
    return pc[GI_W+1:2] ^ GI_W'(h);
  endfunction

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      logic lp, gp;
      lp = lpht[lht[pred_pc_i[p][LI_W+1:2]]][1];
      gp = gpht[gidx(pred_pc_i[p], ghr[pred_tid_i[p]])][1];
      pred_taken_o[p] = sel[pred_pc_i[p][SI_W+1:2]][1] ? gp : lp;
    end
  end

  function automatic logic [1:0] sat(input logic [1:0] c, input logic up);
    if (up) return (c == 2'b11) ? c : c + 2'b01;
    else    return (c == 2'b00) ? c : c - 2'b01;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LOCAL_LINES; i++) lht[i] <= '0;
      for (int i = 0; i < 2**LHIST_W; i++) lpht[i] <= 2'b01;   // weakly not taken
      for (int i = 0; i < GSHARE_LINES; i++) gpht[i] <= 2'b10; // weakly taken
      for (int i = 0; i < SEL_LINES; i++) sel[i] <= 2'b10;     // weakly global
      for (int u = 0; u < NU; u++) ghr[u] <= '0;
    end else begin
      for (int u = 0; u < NU; u++) begin
        if (upd_valid_i[u]) begin
          logic [LI_W-1:0]    li;
          logic [LHIST_W-1:0] h;
          logic [GI_W-1:0]    gi;
          logic [SI_W-1:0]    si;
          logic lp, gp;
          li = upd_pc_i[u][LI_W+1:2];
          h  = lht[li];
          gi = gidx(upd_pc_i[u], ghr[u]);
          si = upd_pc_i[u][SI_W+1:2];
          lp = lpht[h][1];
          gp = gpht[gi][1];
          lpht[h] <= sat(lpht[h], upd_taken_i[u]);
          gpht[gi] <= sat(gpht[gi], upd_taken_i[u]);
          lht[li] <= {h[LHIST_W-2:0], upd_taken_i[u]};
          ghr[u]  <= {ghr[u][GHIST_W-2:0], upd_taken_i[u]};
          if (lp != gp) sel[si] <= sat(sel[si], gp == upd_taken_i[u]);
        end
      end
    end
  end
endmodule
