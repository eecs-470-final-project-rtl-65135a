// tb_lb: self-checking directed test of the shared load buffer. The bench plays the ALUs
// (addresses), the store queue (wait / forward answers) and the data cache (hit, miss
// accepted, line fill). Checks:
//  - a load asks nothing until its address arrives, then queries with its own address,
//    thread and recorded store-queue tail;
//  - a cache hit completes it the next cycle with the right word; the result stays on
//    the bus until granted, then the entry is freed;
//  - byte loads are sign- or zero-extended from the right byte;
//  - a "wait" answer keeps the load away from the cache; a forwarded word completes it;
//  - two misses to the same line both complete from one fill;
//  - an lr.w that hits reserves its address for its thread;
//  - a flush removes only the flushed thread's loads.
// Prints TB_RESULT; a watchdog ends a hung run.
module tb_lb;
  import cpu_pkg::*;
  localparam int NS = 2;
  logic clk = 0, rst = 1;
  logic alloc [NS], atid [NS];
  dec_t d [NS];
  tag_t dest [NS];
  logic [ROB_W-1:0] rob [NS];
  logic [SQ_W:0] sqt [NS], q_tail;
  logic [LB_W-1:0] aidx [NS], addr_idx [2];
  logic [$clog2(LB_SZ+1)-1:0] free;
  logic addr_v [2], q_valid, q_tid, q_lr, q_wait, q_fwd, dc_req, dc_hit, dc_acc, fill_v, grant;
  logic lr [NT], flush [NT];
  word_t addr [2], q_addr, q_word, dc_addr, fill_addr, lr_addr [NT];
  logic [2:0] q_f3;
  logic [63:0] dc_line, fill_line;
  cdb_t res;
  int checks = 0, failures = 0;

  lb dut (.clk, .rst, .alloc_i(alloc), .alloc_tid_i(atid), .alloc_d_i(d), .alloc_dest_i(dest),
    .alloc_rob_i(rob), .alloc_sqt_i(sqt), .alloc_idx_o(aidx), .free_o(free), .addr_v_i(addr_v),
    .addr_idx_i(addr_idx), .addr_i(addr), .q_valid_o(q_valid), .q_tid_o(q_tid), .q_addr_o(q_addr),
    .q_f3_o(q_f3), .q_lr_o(q_lr), .q_tail_o(q_tail), .q_wait_i(q_wait), .q_fwd_i(q_fwd),
    .q_word_i(q_word), .dc_req_o(dc_req), .dc_addr_o(dc_addr), .dc_hit_i(dc_hit), .dc_acc_i(dc_acc),
    .dc_line_i(dc_line), .fill_v_i(fill_v), .fill_addr_i(fill_addr), .fill_line_i(fill_line),
    .res_o(res), .grant_i(grant), .lr_o(lr), .lr_addr_o(lr_addr), .flush_i(flush));
  always #5 clk = ~clk;
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic step();
    @(posedge clk); #1;
    alloc = '{0, 0}; addr_v = '{0, 0}; q_wait = 0; q_fwd = 0; dc_hit = 0; dc_acc = 0; fill_v = 0; grant = 0;
    #1;
  endtask
  // allocate one load in slot 0 and give its address in the next cycle; returns its index
  task automatic load(logic t, logic [2:0] f3, int dp, logic is_lr, int tail, word_t a, output logic [LB_W-1:0] idx);
    alloc[0] = 1; atid[0] = t; d[0] = '0; d[0].valid = 1; d[0].fu = FU_LOAD; d[0].funct3 = f3;
    d[0].is_lr = is_lr; dest[0] = '{t, 7'(dp)}; rob[0] = ROB_W'(dp); sqt[0] = (SQ_W+1)'(tail);
    #1 idx = aidx[0];
    step();
    chk("no query before address", 32'(q_valid && dut.pick == idx), 0);
    addr_v[0] = 1; addr_idx[0] = idx; addr[0] = a;
    step();
  endtask
  // take the result off the bus and check it
  task automatic result(string n, int dp, word_t v);
    chk({n, " result valid"}, 32'(res.valid), 1);
    chk({n, " result tag"}, 32'(res.tag.prn), 32'(dp));
    chk({n, " result value"}, res.value, v);
    grant = 1;
    step();
  endtask

  initial begin
    logic [LB_W-1:0] i0, i1;
    alloc = '{0, 0}; atid = '{0, 0}; d = '{default: '0}; dest = '{default: '0}; rob = '{0, 0};
    sqt = '{0, 0}; addr_v = '{0, 0}; addr_idx = '{0, 0}; addr = '{0, 0}; flush = '{0, 0};
    q_wait = 0; q_fwd = 0; q_word = '0; dc_hit = 0; dc_acc = 0; dc_line = '0; fill_v = 0;
    fill_addr = '0; fill_line = '0; grant = 0;
    repeat (3) @(posedge clk); #1 rst = 0; #1;
    chk("empty", 32'(free), LB_SZ);

    // hit
    load(0, 3'b010, 10, 0, 3, 32'h104, i0);
    chk("one used", 32'(free), LB_SZ - 1);
    chk("query valid", 32'(q_valid), 1);
    chk("query addr", q_addr, 32'h104);
    chk("query tail", 32'(q_tail), 3);
    chk("query thread", 32'(q_tid), 0);
    chk("asks cache", 32'(dc_req), 1);
    dc_hit = 1; dc_line = {32'h11223344, 32'h55667788};
    step();
    chk("held until granted", 32'(res.valid), 1);
    step();
    result("lw hit", 10, 32'h11223344);
    chk("freed", 32'(free), LB_SZ);

    // signed and unsigned bytes
    load(1, 3'b000, 11, 0, 0, 32'h107, i0);
    dc_hit = 1; dc_line = {32'h80FFFFFF, 32'h0};
    step();
    result("lb", 11, 32'hFFFFFF80);
    load(1, 3'b100, 12, 0, 0, 32'h107, i0);
    dc_hit = 1; dc_line = {32'h80FFFFFF, 32'h0};
    step();
    result("lbu", 12, 32'h00000080);

    // wait, then forward
    load(0, 3'b010, 13, 0, 1, 32'h300, i0);
    q_wait = 1; #1;
    chk("wait keeps cache idle", 32'(dc_req), 0);
    step();
    chk("no result while waiting", 32'(res.valid), 0);
    q_fwd = 1; q_word = 32'h12345678; #1;
    chk("forward keeps cache idle", 32'(dc_req), 0);
    step();
    result("forwarded", 13, 32'h12345678);

    // two misses to one line
    load(0, 3'b010, 14, 0, 0, 32'h200, i0);
    dc_acc = 1;
    step();
    load(1, 3'b010, 15, 0, 0, 32'h204, i1);
    dc_acc = 1;
    step();
    chk("misses wait", 32'(res.valid), 0);
    chk("no more queries", 32'(q_valid), 0);
    fill_v = 1; fill_addr = 32'h200; fill_line = {32'hBEEF0001, 32'hCAFEF00D};
    step();
    result("fill first", 14, 32'hCAFEF00D);
    result("fill second", 15, 32'hBEEF0001);

    // lr.w reserves on a hit
    load(1, 3'b010, 16, 1, 0, 32'h400, i0);
    chk("lr query flag", 32'(q_lr), 1);
    dc_hit = 1; dc_line = 64'h1; #1;
    chk("lr reserves", 32'(lr[1]), 1);
    chk("lr address", lr_addr[1], 32'h400);
    chk("other thread untouched", 32'(lr[0]), 0);
    step();
    result("lr", 16, 32'h1);

    // flush thread 1 only
    load(1, 3'b010, 17, 0, 0, 32'h500, i0);
    load(0, 3'b010, 18, 0, 0, 32'h600, i1);
    chk("two waiting", 32'(free), LB_SZ - 2);
    flush = '{0, 1};
    step();
    flush = '{0, 0};
    chk("thread 1 load gone", 32'(free), LB_SZ - 1);
    chk("remaining query", q_addr, 32'h600);
    dc_hit = 1; dc_line = {32'h0, 32'h66};
    step();
    result("after flush", 18, 32'h66);
    chk("empty at end", 32'(free), LB_SZ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
