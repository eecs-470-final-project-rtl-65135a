// btb: branch target buffer for jalr targets, 64 lines organised as 32 sets of 2 ways,
// indexed by PC[6:2]. Each line holds a valid bit, the remaining PC bits as tag and the
// target. Lookup is combinational on NP ports; an update (from a retiring jalr) writes
// the matching way or, on a miss, the way that was least recently written in that set.
// The geometry follows the design description; storing the full tag and target and the
// replacement rule are this design's choices.
module btb
  import cpu_pkg::*;
#(
  parameter int LINES = 64,
  parameter int WAYS  = 2,
  parameter int NP    = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t lk_pc_i   [NP],
  output logic  lk_hit_o  [NP],
  output word_t lk_tgt_o  [NP],
  input  logic  upd_valid_i,
  input  word_t upd_pc_i,
  input  word_t upd_tgt_i
);
  localparam int SETS  = LINES / WAYS;
  localparam int SI_W  = $clog2(SETS);
  localparam int TAG_W = XLEN - 2 - SI_W;

  logic             vld [SETS][WAYS];
  logic [TAG_W-1:0] tag [SETS][WAYS];
  word_t            tgt [SETS][WAYS];
  logic             lru [SETS];        // way to replace next

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      logic [SI_W-1:0] s;
      s = lk_pc_i[p][SI_W+1:2];
      lk_hit_o[p] = 1'b0;
      lk_tgt_o[p] = '0;
      for (int w = 0; w < WAYS; w++)
        if (vld[s][w] && tag[s][w] == lk_pc_i[p][XLEN-1:SI_W+2]) begin
          lk_hit_o[p] = 1'b1;
          lk_tgt_o[p] = tgt[s][w];
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SETS; s++) begin
        lru[s] <= 1'b0;
        for (int w = 0; w < WAYS; w++) vld[s][w] <= 1'b0;
      end
    end else if (upd_valid_i) begin
      logic [SI_W-1:0] s;
      logic hit;
      s = upd_pc_i[SI_W+1:2];
      hit = 1'b0;
      for (int w = 0; w < WAYS; w++)
        if (vld[s][w] && tag[s][w] == upd_pc_i[XLEN-1:SI_W+2]) begin
          hit = 1'b1;
          tgt[s][w] <= upd_tgt_i;
        end
      if (!hit) begin
        vld[s][lru[s]] <= 1'b1;
        tag[s][lru[s]] <= upd_pc_i[XLEN-1:SI_W+2];
        tgt[s][lru[s]] <= upd_tgt_i;
        lru[s] <= ~lru[s];
      end
    end
  end
endmodule
