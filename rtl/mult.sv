// mult: pipelined 32x32 multiplier for mul, mulh, mulhsu and mulhu.
// The 64-bit product is built over STAGES pipeline stages, each adding 32/STAGES partial
// products of the multiplier into a running sum, so one multiplication can start every
// cycle and its result appears STAGES cycles later. The pipeline advances only when the
// result register is empty or its result has been taken by the result bus (stall_o
// tells the issue logic not to start a new one). flush_i[t] removes every
// operation of one thread, as needed when that thread recovers from a misprediction.
// The number of stages is not given by the design description; 4 is this design's choice.
module mult
  import cpu_pkg::*;
#(
  parameter int STAGES = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  fu_in_t in_i,        // valid only when d.fu == FU_MULT
  input  logic   grant_i,     // result bus took the result this cycle
  input  logic   flush_i [NT],   // squash all operations of a thread
  output cdb_t   res_o,
  output logic   stall_o
);
  localparam int STEP = 32 / STAGES;

  typedef struct packed {
    logic  valid;
    logic  tid;
    tag_t  dest;
    logic  has_dest;
    logic [ROB_W-1:0] rob_idx;
    logic [1:0] kind;        // funct3[1:0]: 0 mul, 1 mulh, 2 mulhsu, 3 mulhu
    logic [63:0] mcand;      // sign/zero-extended multiplicand
    logic [63:0] mplier;     // sign/zero-extended multiplier
    logic [63:0] sum;
  } st_t;

  st_t   st [STAGES+1];       // st[0] = input, st[k] = after stage k
  st_t   nx [STAGES+1];
  logic  adv;

  assign stall_o = st[STAGES].valid && !grant_i;
  assign adv     = !stall_o;

  always_comb begin
    logic sa, sb;
    nx[0] = '0;
    sa = (in_i.d.funct3[1:0] == 2'd1) || (in_i.d.funct3[1:0] == 2'd2);
    sb = (in_i.d.funct3[1:0] == 2'd1);
    nx[0].valid    = in_i.valid && in_i.d.fu == FU_MULT;
    nx[0].tid      = in_i.tid;
    nx[0].dest     = in_i.dest;
    nx[0].has_dest = in_i.d.has_dest;
    nx[0].rob_idx  = in_i.rob_idx;
    nx[0].kind     = in_i.d.funct3[1:0];
    nx[0].mcand    = {{32{sa & in_i.a[31]}}, in_i.a};
    nx[0].mplier   = {{32{sb & in_i.b[31]}}, in_i.b};
    nx[0].sum      = '0;
    for (int k = 1; k <= STAGES; k++) begin
      nx[k] = st[k-1];
      // the last stage also covers the sign-extension bits of the multiplier
      for (int j = 0; j < 64; j++)
        if ((j >= (k-1)*STEP && j < k*STEP) || (k == STAGES && j >= 32))
          if (st[k-1].mplier[j]) nx[k].sum = nx[k].sum + (st[k-1].mcand << j);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k <= STAGES; k++) st[k] <= '0;
    end else if (adv) begin
      st[0] <= nx[0];
      for (int k = 1; k <= STAGES; k++) st[k] <= nx[k];
      if (flush_i[in_i.tid]) st[0].valid <= 1'b0;
      for (int k = 1; k <= STAGES; k++)
        if (flush_i[st[k-1].tid]) st[k].valid <= 1'b0;
    end else begin
      for (int k = 0; k <= STAGES; k++)
        if (flush_i[st[k].tid]) st[k].valid <= 1'b0;
    end
  end

  always_comb begin
    res_o          = '0;
    res_o.valid    = st[STAGES].valid;
    res_o.tag      = st[STAGES].dest;
    res_o.has_dest = st[STAGES].has_dest;
    res_o.rob_idx  = st[STAGES].rob_idx;
    res_o.value    = (st[STAGES].kind == 2'd0) ? st[STAGES].sum[31:0] : st[STAGES].sum[63:32];
    res_o.npc      = '0;
  end
endmodule
