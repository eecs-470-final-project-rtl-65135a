// rs: reservation station, RS_SZ (16) entries shared by both threads.
// Dispatch writes up to NS instructions per cycle into free entries. An entry waits
// until both source tags are ready, watching the result buses. Wake-up also uses early
// tag broadcast: the destination tags of the instructions that the ALUs start this
// cycle are broadcast now, because their results will be on the result bus next cycle,
// so a dependent instruction can issue in that next cycle, back to back, taking the
// value from the bus bypass. A priority selector per functional unit then picks, each
// cycle, up to two ready ALU-class entries (ALU operations and load address
// computations) and one ready multiply, lowest entry number first. Issued entries are
// freed at once. flush_i removes every entry of thread flush_tid_i.
module rs
  import cpu_pkg::*;
#(
  parameter int SZ = RS_SZ,
  parameter int NS = 2
) (
  input  logic clk,
  input  logic rst,
  // dispatch
  input  logic  alloc_i     [NS],
  input  logic  alloc_tid_i [NS],
  input  dec_t  alloc_d_i   [NS],
  input  tag_t  alloc_dest_i[NS],
  input  tag_t  alloc_src1_i[NS],
  input  tag_t  alloc_src2_i[NS],
  input  logic  alloc_rdy1_i[NS],    // ready in the register file
  input  logic  alloc_rdy2_i[NS],
  input  logic [ROB_W-1:0] alloc_rob_i [NS],
  input  logic [LB_W-1:0]  alloc_lb_i  [NS],
  output logic [$clog2(SZ+1)-1:0] free_o,
  // wake-up
  input  cdb_t  cdb_i [CDB_W],
  // issue
  input  logic  mult_stall_i,
  output fu_in_t iss_alu_o [2],
  output tag_t   iss_alu_src1_o [2],
  output tag_t   iss_alu_src2_o [2],
  output fu_in_t iss_mul_o,
  output tag_t   iss_mul_src1_o,
  output tag_t   iss_mul_src2_o,
  // squash
  input  logic  flush_i [NT]
);
  typedef struct packed {
    logic  valid;
    logic  tid;
    dec_t  d;
    tag_t  dest;
    tag_t  src1, src2;
    logic  rdy1, rdy2;
    logic [ROB_W-1:0] rob_idx;
    logic [LB_W-1:0]  lb_idx;
  } ent_t;

  ent_t ent [SZ];
  logic [SZ-1:0] ready;
  int unsigned sel_alu [2];
  logic        sel_alu_v [2];
  int unsigned sel_mul;
  logic        sel_mul_v;
  tag_t  early [2];
  logic  early_v [2];

  function automatic logic woken(input tag_t t, input cdb_t c [CDB_W],
                                 input tag_t e [2], input logic ev [2]);
    logic w;
    w = 1'b0;
    for (int k = 0; k < CDB_W; k++)
      if (c[k].valid && c[k].has_dest && c[k].tag == t) w = 1'b1;
    for (int k = 0; k < 2; k++)
      if (ev[k] && e[k] == t) w = 1'b1;
    return w;
  endfunction

  always_comb begin
    for (int i = 0; i < SZ; i++) ready[i] = ent[i].valid && ent[i].rdy1 && ent[i].rdy2;
    // priority selectors
    sel_alu_v[0] = 1'b0; sel_alu_v[1] = 1'b0; sel_alu[0] = 0; sel_alu[1] = 0;
    sel_mul_v = 1'b0; sel_mul = 0;
    for (int i = SZ-1; i >= 0; i--) begin
      if (ready[i] && ent[i].d.fu != FU_MULT) begin
        sel_alu_v[1] = sel_alu_v[0]; sel_alu[1] = sel_alu[0];
        sel_alu_v[0] = 1'b1;         sel_alu[0] = i;
      end
      if (ready[i] && ent[i].d.fu == FU_MULT && !mult_stall_i) begin
        sel_mul_v = 1'b1; sel_mul = i;
      end
    end
    for (int k = 0; k < 2; k++) begin
      ent_t e;
      e = ent[sel_alu[k]];
      iss_alu_o[k]         = '0;
      iss_alu_o[k].valid   = sel_alu_v[k] && !flush_i[e.tid];
      iss_alu_o[k].tid     = e.tid;
      iss_alu_o[k].d       = e.d;
      iss_alu_o[k].dest    = e.dest;
      iss_alu_o[k].rob_idx = e.rob_idx;
      iss_alu_o[k].lb_idx  = e.lb_idx;
      iss_alu_src1_o[k]    = e.src1;
      iss_alu_src2_o[k]    = e.src2;
      early_v[k] = iss_alu_o[k].valid && e.d.fu == FU_ALU && e.d.has_dest;
      early[k]   = e.dest;
    end
    iss_mul_o         = '0;
    iss_mul_o.valid   = sel_mul_v && !flush_i[ent[sel_mul].tid];
    iss_mul_o.tid     = ent[sel_mul].tid;
    iss_mul_o.d       = ent[sel_mul].d;
    iss_mul_o.dest    = ent[sel_mul].dest;
    iss_mul_o.rob_idx = ent[sel_mul].rob_idx;
    iss_mul_src1_o    = ent[sel_mul].src1;
    iss_mul_src2_o    = ent[sel_mul].src2;
  end

  always_comb begin
    free_o = '0;
    for (int i = 0; i < SZ; i++) free_o = free_o + !ent[i].valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < SZ; i++) ent[i] <= '0;
    end else begin
      logic [SZ-1:0] taken;
      taken = '0;
      for (int i = 0; i < SZ; i++) begin
        if (ent[i].valid) begin
          if (woken(ent[i].src1, cdb_i, early, early_v)) ent[i].rdy1 <= 1'b1;
          if (woken(ent[i].src2, cdb_i, early, early_v)) ent[i].rdy2 <= 1'b1;
        end
        taken[i] = ent[i].valid;
      end
      for (int k = 0; k < 2; k++) if (sel_alu_v[k]) ent[sel_alu[k]].valid <= 1'b0;
      if (sel_mul_v) ent[sel_mul].valid <= 1'b0;
      for (int s = 0; s < NS; s++)
        if (alloc_i[s]) begin
          int slot;
          ent_t e;
          slot = -1;
          for (int i = SZ-1; i >= 0; i--) if (!taken[i]) slot = i;
          if (slot >= 0) begin
            taken[slot] = 1'b1;
            e.valid   = 1'b1;
            e.tid     = alloc_tid_i[s];
            e.d       = alloc_d_i[s];
            e.dest    = alloc_dest_i[s];
            e.src1    = alloc_src1_i[s];
            e.src2    = alloc_src2_i[s];
            e.rdy1    = alloc_rdy1_i[s] || !alloc_d_i[s].use_rs1 || alloc_src1_i[s].prn == '0 ||
                        woken(alloc_src1_i[s], cdb_i, early, early_v);
            e.rdy2    = alloc_rdy2_i[s] || !alloc_d_i[s].use_rs2 || alloc_src2_i[s].prn == '0 ||
                        woken(alloc_src2_i[s], cdb_i, early, early_v);
            e.rob_idx = alloc_rob_i[s];
            e.lb_idx  = alloc_lb_i[s];
            ent[slot] <= e;
          end
        end
      for (int i = 0; i < SZ; i++)
        for (int t = 0; t < NT; t++)
          if (flush_i[t] && ent[i].valid && ent[i].tid == 1'(t)) ent[i].valid <= 1'b0;
    end
  end
endmodule
