// tb_dispatch_arbiter: self-checking test of the dispatch arbiter.
// Checks: with work in both threads the two slots go to both threads' oldest instruction
// and the priority alternates; a blocked thread gives both slots to the other; a lack of
// store-queue or load-buffer space stops a thread in order (its second instruction must
// not pass its first); a full reservation station still lets stores go. Prints TB_RESULT.
module tb_dispatch_arbiter;
  import cpu_pkg::*;
  logic clk = 0, rst = 1;
  dec_t d [NT][2];
  logic blk [NT], gv [2], gt [2], gk [2], both;
  logic [ROB_W:0] rf [NT];
  logic [SQ_W:0] sf [NT];
  logic [$clog2(NPR+1)-1:0] ff [NT];
  logic [$clog2(RS_SZ+1)-1:0] rsf;
  logic [$clog2(LB_SZ+1)-1:0] lbf;
  logic [1:0] pop [NT];
  int checks = 0, failures = 0;
  dispatch_arbiter dut (.clk, .rst, .d_i(d), .block_i(blk), .rob_free_i(rf), .sq_free_i(sf),
      .fl_free_i(ff), .rs_free_i(rsf), .lb_free_i(lbf), .gnt_v_o(gv), .gnt_tid_o(gt),
      .gnt_k_o(gk), .pop_o(pop), .both_o(both));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic set(int t, int k, fu_t fu);
    d[t][k] = '0; d[t][k].valid = 1; d[t][k].fu = fu; d[t][k].has_dest = fu != FU_STORE;
  endtask
  initial begin
    logic first;
    for (int t = 0; t < NT; t++) begin
      blk[t] = 0; rf[t] = 64; sf[t] = 8; ff[t] = 64; set(t, 0, FU_ALU); set(t, 1, FU_ALU);
    end
    rsf = 16; lbf = 8;
    repeat (2) @(posedge clk); #1 rst = 0;
    #1 chk("both threads", 32'(both), 1); chk("pop t0", 32'(pop[0]), 1); chk("pop t1", 32'(pop[1]), 1);
    first = gt[0];
    @(posedge clk); #1 chk("priority alternates", 32'(gt[0]), 32'(!first));
    blk[0] = 1; #1;
    chk("blocked thread gets none", 32'(pop[0]), 0); chk("other gets two", 32'(pop[1]), 2);
    chk("in order", 32'(gk[0] == 0 && gk[1] == 1), 1);
    blk[0] = 0; blk[1] = 1; set(0, 0, FU_STORE); set(0, 1, FU_ALU); sf[0] = 0; #1;
    chk("no store room: thread stops in order", 32'(pop[0]), 0);
    sf[0] = 8; set(0, 0, FU_LOAD); set(0, 1, FU_LOAD); lbf = 1; #1;
    chk("one load buffer slot: one load", 32'(pop[0]), 1);
    lbf = 8; rsf = 0; set(0, 0, FU_STORE); set(0, 1, FU_ALU); #1;
    chk("full RS: store still goes", 32'(pop[0]), 1);
    rsf = 16; ff[0] = 0; set(0, 0, FU_ALU); #1;
    chk("no free register: stop", 32'(pop[0]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
