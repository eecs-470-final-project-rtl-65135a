// tb_rs: self-checking directed test of the shared reservation station. Checks:
//  - an entry with an unready source waits, and issues the cycle after its tag appears
//    on a result bus;
//  - early tag broadcast: an ALU instruction that depends on one issuing now issues in
//    the very next cycle (back to back);
//  - two ready ALU instructions issue in the same cycle (the peak rate of two ALU issues
//    per cycle), the lower entry first;
//  - a multiply waits while the multiplier stalls, and issues when it does not;
//  - a flush removes only the flushed thread's entries;
//  - the free count follows allocation and issue.
// Prints TB_RESULT; a watchdog ends a hung run.
module tb_rs;
  import cpu_pkg::*;
  localparam int NS = 2;
  logic clk = 0, rst = 1;
  logic alloc [NS], atid [NS], rdy1 [NS], rdy2 [NS], mstall, flush [NT];
  dec_t d [NS];
  tag_t dest [NS], s1 [NS], s2 [NS];
  logic [ROB_W-1:0] rob [NS];
  logic [LB_W-1:0] lbi [NS];
  logic [$clog2(RS_SZ+1)-1:0] free;
  cdb_t cdb [CDB_W];
  fu_in_t ialu [2], imul;
  tag_t ia1 [2], ia2 [2], im1, im2;
  int checks = 0, failures = 0;

  rs dut (.clk, .rst, .alloc_i(alloc), .alloc_tid_i(atid), .alloc_d_i(d), .alloc_dest_i(dest),
    .alloc_src1_i(s1), .alloc_src2_i(s2), .alloc_rdy1_i(rdy1), .alloc_rdy2_i(rdy2),
    .alloc_rob_i(rob), .alloc_lb_i(lbi), .free_o(free), .cdb_i(cdb), .mult_stall_i(mstall),
    .iss_alu_o(ialu), .iss_alu_src1_o(ia1), .iss_alu_src2_o(ia2), .iss_mul_o(imul),
    .iss_mul_src1_o(im1), .iss_mul_src2_o(im2), .flush_i(flush));
  always #5 clk = ~clk;
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  function automatic tag_t tg(logic t, int p); return '{t, 7'(p)}; endfunction
  // set slot s to allocate one instruction this cycle
  task automatic put(int s, logic t, fu_t fu, int dp, int p1, logic r1, int p2, logic r2);
    alloc[s] = 1; atid[s] = t; d[s] = '0; d[s].valid = 1; d[s].fu = fu; d[s].has_dest = 1;
    d[s].use_rs1 = 1; d[s].use_rs2 = 1; dest[s] = tg(t, dp); s1[s] = tg(t, p1); s2[s] = tg(t, p2);
    rdy1[s] = r1; rdy2[s] = r2; rob[s] = ROB_W'(dp);
  endtask
  task automatic step(); @(posedge clk); #1 alloc = '{0, 0}; cdb = '{default: '0}; #1; endtask

  initial begin
    alloc = '{0, 0}; atid = '{0, 0}; rdy1 = '{0, 0}; rdy2 = '{0, 0}; d = '{default: '0};
    dest = '{default: '0}; s1 = '{default: '0}; s2 = '{default: '0}; rob = '{0, 0}; lbi = '{0, 0};
    cdb = '{default: '0}; mstall = 0; flush = '{0, 0};
    repeat (3) @(posedge clk); #1 rst = 0; #1;
    chk("empty", 32'(free), RS_SZ);

    // A waits for tag 3; B depends on A
    put(0, 0, FU_ALU, 10, 3, 0, 4, 1);
    put(1, 0, FU_ALU, 11, 10, 0, 4, 1);
    step();
    chk("two allocated", 32'(free), RS_SZ - 2);
    chk("nothing ready", 32'(ialu[0].valid | ialu[1].valid), 0);
    step();
    chk("still waiting", 32'(ialu[0].valid), 0);
    cdb[1].valid = 1; cdb[1].has_dest = 1; cdb[1].tag = tg(0, 3);
    @(posedge clk); #1 cdb = '{default: '0}; #1;
    chk("A issues after wake-up", 32'(ialu[0].valid), 1);
    chk("A dest", 32'(ialu[0].dest.prn), 10);
    chk("A only", 32'(ialu[1].valid), 0);
    step();
    chk("B issues back to back", 32'(ialu[0].valid), 1);
    chk("B dest", 32'(ialu[0].dest.prn), 11);
    chk("B source tag", 32'(ia1[0].prn), 10);
    step();
    chk("empty again", 32'(free), RS_SZ);

    // two ready ALU instructions issue together
    put(0, 1, FU_ALU, 20, 1, 1, 2, 1);
    put(1, 0, FU_LOAD, 21, 1, 1, 2, 1);
    step();
    chk("dual issue 0", 32'(ialu[0].valid), 1);
    chk("dual issue 1", 32'(ialu[1].valid), 1);
    chk("lower entry first", 32'(ialu[0].dest.prn), 20);
    chk("thread of first", 32'(ialu[0].tid), 1);
    chk("second is the load", 32'(ialu[1].dest.prn), 21);
    step();

    // multiply and the multiplier stall
    mstall = 1;
    put(0, 0, FU_MULT, 30, 1, 1, 2, 1);
    step();
    chk("mult held by stall", 32'(imul.valid), 0);
    chk("mult not on ALU", 32'(ialu[0].valid), 0);
    step();
    chk("mult still held", 32'(imul.valid), 0);
    mstall = 0; #1;
    chk("mult issues", 32'(imul.valid), 1);
    chk("mult dest", 32'(imul.dest.prn), 30);
    step();
    chk("mult left", 32'(free), RS_SZ);

    // flush one thread
    put(0, 1, FU_ALU, 40, 5, 0, 2, 1);
    put(1, 0, FU_ALU, 41, 6, 0, 2, 1);
    step();
    flush = '{0, 1};
    step();
    flush = '{0, 0};
    chk("thread 1 entry gone", 32'(free), RS_SZ - 1);
    cdb[0].valid = 1; cdb[0].has_dest = 1; cdb[0].tag = tg(1, 5);
    cdb[2].valid = 1; cdb[2].has_dest = 1; cdb[2].tag = tg(0, 6);
    @(posedge clk); #1 cdb = '{default: '0}; #1;
    chk("thread 0 entry issues", 32'(ialu[0].valid), 1);
    chk("it is thread 0's", 32'(ialu[0].dest.prn), 41);
    chk("flushed entry does not", 32'(ialu[1].valid), 0);
    step();
    chk("empty at end", 32'(free), RS_SZ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
