// tb_sq: self-checking directed test of one thread's store queue (thread 0, two dispatch
// slots, slot 0 used). Checks, in order:
//  - forwarding: a younger load to the same word gets the store's aligned word, a byte
//    load inside it also forwards, other addresses and loads older than the store do not;
//  - an lr.w waits while any older store is in the queue;
//  - a store whose base register is unknown makes younger loads wait until the value
//    arrives on a result bus; a byte store that only partly covers a word load makes it
//    wait, and a byte load it covers forwards from it rather than from the older store;
//  - stores go to the data cache only after commit, in order, with the right address,
//    aligned word and byte enables, and leave the queue when the cache accepts them;
//  - a flush drops an uncommitted store;
//  - sc.w at the head reports 1 without writing when the reservation is lost, and 0
//    with a cache write when it holds; the result waits on the bus until granted.
// Forwarding answers in the same cycle as the query (checked at once after driving it).
// Prints TB_RESULT; a watchdog ends a hung run.
module tb_sq;
  import cpu_pkg::*;
  localparam int NS = 2;
  logic clk = 0, rst = 1;
  logic disp [NS], brdy [NS], drdy [NS];
  dec_t d [NS];
  tag_t btag [NS], dtag [NS], dest [NS];
  word_t bval [NS], dval [NS];
  logic [ROB_W-1:0] drob [NS];
  logic [SQ_W:0] tail, free;
  cdb_t cdb [CDB_W];
  logic st_ready, commit, head_sc, q_valid, q_lr, q_wait, q_fwd, dc_req, dc_ack, sc_ok, sc_done, sc_grant, flush;
  logic [ROB_W-1:0] head_idx;
  word_t q_addr, q_word, dc_addr, dc_word;
  logic [2:0] q_f3;
  logic [SQ_W:0] q_tail;
  logic [3:0] dc_be;
  cdb_t sc_res;
  int checks = 0, failures = 0;

  sq dut (.clk, .rst, .disp_i(disp), .disp_d_i(d), .disp_base_i(btag),
    .disp_data_i(dtag), .disp_brdy_i(brdy), .disp_bval_i(bval), .disp_drdy_i(drdy),
    .disp_dval_i(dval), .disp_dest_i(dest), .disp_rob_i(drob), .tail_o(tail), .free_o(free),
    .cdb_i(cdb), .st_ready_o(st_ready), .commit_i(commit), .rob_head_sc_i(head_sc),
    .rob_head_idx_i(head_idx), .q_valid_i(q_valid), .q_addr_i(q_addr), .q_f3_i(q_f3),
    .q_lr_i(q_lr), .q_tail_i(q_tail), .q_wait_o(q_wait), .q_fwd_o(q_fwd), .q_word_o(q_word),
    .dc_req_o(dc_req), .dc_addr_o(dc_addr), .dc_word_o(dc_word), .dc_be_o(dc_be),
    .dc_ack_i(dc_ack), .sc_ok_i(sc_ok), .sc_done_o(sc_done), .sc_res_o(sc_res),
    .sc_grant_i(sc_grant), .flush_i(flush));
  always #5 clk = ~clk;
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask

  // dispatch one store (or sc.w) in slot 0 for one cycle
  task automatic store(logic [2:0] f3, word_t imm, logic sc, logic br, word_t bv, tag_t bt,
                       logic dr, word_t dv, tag_t ds, logic [ROB_W-1:0] r);
    d[0] = '0; d[0].valid = 1; d[0].fu = FU_STORE; d[0].funct3 = f3; d[0].imm = imm; d[0].is_sc = sc;
    brdy[0] = br; bval[0] = bv; btag[0] = bt; drdy[0] = dr; dval[0] = dv; dtag[0] = '{1'b0, 7'd40};
    dest[0] = ds; drob[0] = r; disp[0] = 1;
    @(posedge clk); #1 disp[0] = 0;
  endtask
  // ask about a load; answers are combinational
  task automatic query(string n, word_t a, logic [2:0] f3, logic lr, logic [SQ_W:0] qt,
                       logic ew, logic ef, word_t eword);
    q_valid = 1; q_addr = a; q_f3 = f3; q_lr = lr; q_tail = qt;
    #1;
    chk({n, " wait"}, 32'(q_wait), 32'(ew));
    chk({n, " fwd"}, 32'(q_fwd), 32'(ef));
    if (ef) chk({n, " word"}, q_word, eword);
    q_valid = 0;
  endtask

  initial begin
    disp = '{0, 0}; brdy = '{0, 0}; drdy = '{0, 0}; d = '{default: '0};
    btag = '{default: '0}; dtag = '{default: '0}; dest = '{default: '0};
    bval = '{0, 0}; dval = '{0, 0}; drob = '{0, 0};
    cdb = '{default: '0};
    commit = 0; head_sc = 0; head_idx = '0; q_valid = 0; q_addr = '0; q_f3 = '0; q_lr = 0; q_tail = '0;
    dc_ack = 0; sc_ok = 0; sc_grant = 0; flush = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    chk("empty free", 32'(free), SQ_SZ);

    // S0: sw 0xAABBCCDD to 0x100+4
    store(3'b010, 32'd4, 0, 1, 32'h100, '0, 1, 32'hAABBCCDD, '0, 6'd1);
    chk("free after one", 32'(free), SQ_SZ - 1);
    chk("tail", 32'(tail), 1);
    query("lw same word", 32'h104, 3'b010, 0, 1, 0, 1, 32'hAABBCCDD);
    query("lbu inside", 32'h105, 3'b100, 0, 1, 0, 1, 32'hAABBCCDD);
    query("lw other word", 32'h108, 3'b010, 0, 1, 0, 0, 0);
    query("older load", 32'h104, 3'b010, 0, 0, 0, 0, 0);
    query("lr.w waits", 32'h200, 3'b010, 1, 1, 1, 0, 0);

    // S1: sb 0x11, base register (tag 5) not yet known
    store(3'b000, 32'd0, 0, 0, 32'h0, '{1'b0, 7'd5}, 1, 32'h11, '0, 6'd2);
    query("unknown address", 32'h104, 3'b010, 0, 2, 1, 0, 0);
    chk("st_ready (head resolved)", 32'(st_ready), 1);
    cdb[0].valid = 1; cdb[0].has_dest = 1; cdb[0].tag = '{1'b0, 7'd5}; cdb[0].value = 32'h106;
    @(posedge clk); #1 cdb[0] = '0;
    query("partial cover", 32'h104, 3'b010, 0, 2, 1, 0, 0);
    query("byte forward", 32'h106, 3'b100, 0, 2, 0, 1, 32'h00110000);
    query("byte from older", 32'h107, 3'b100, 0, 2, 0, 1, 32'hAABBCCDD);

    // commit and drain in order
    chk("no write before commit", 32'(dc_req), 0);
    commit = 1; @(posedge clk); #1 commit = 0;
    chk("write S0 req", 32'(dc_req), 1);
    chk("write S0 addr", dc_addr, 32'h104);
    chk("write S0 word", dc_word, 32'hAABBCCDD);
    chk("write S0 be", 32'(dc_be), 32'hF);
    @(posedge clk); #1;
    chk("held until accepted", 32'(dc_req), 1);
    commit = 1; dc_ack = 1; @(posedge clk); #1 commit = 0; dc_ack = 0;
    chk("write S1 req", 32'(dc_req), 1);
    chk("write S1 addr", dc_addr, 32'h106);
    chk("write S1 word", dc_word, 32'h00110000);
    chk("write S1 be", 32'(dc_be), 32'b0100);
    dc_ack = 1; @(posedge clk); #1 dc_ack = 0;
    chk("drained", 32'(free), SQ_SZ);
    chk("no write when empty", 32'(dc_req), 0);

    // flush drops an uncommitted store
    store(3'b010, 32'd0, 0, 1, 32'h300, '0, 1, 32'h5, '0, 6'd3);
    chk("one pending", 32'(free), SQ_SZ - 1);
    flush = 1; @(posedge clk); #1 flush = 0;
    chk("flushed", 32'(free), SQ_SZ);
    chk("flushed no write", 32'(dc_req), 0);

    // sc.w that fails
    store(3'b010, 32'd0, 1, 1, 32'h400, '0, 1, 32'h9, '{1'b0, 7'd7}, 6'd4);
    chk("sc waits for rob head", 32'(sc_done), 0);
    head_sc = 1; head_idx = 6'd4; sc_ok = 0; #1;
    chk("sc fail done", 32'(sc_done), 1);
    chk("sc fail no write", 32'(dc_req), 0);
    @(posedge clk); #1 head_sc = 0;
    chk("sc fail result valid", 32'(sc_res.valid), 1);
    chk("sc fail value", sc_res.value, 1);
    chk("sc fail tag", 32'(sc_res.tag.prn), 7);
    @(posedge clk); #1;
    chk("result held until granted", 32'(sc_res.valid), 1);
    sc_grant = 1; @(posedge clk); #1 sc_grant = 0;
    chk("result released", 32'(sc_res.valid), 0);

    // sc.w that succeeds
    store(3'b010, 32'd0, 1, 1, 32'h400, '0, 1, 32'h9, '{1'b0, 7'd8}, 6'd5);
    head_sc = 1; head_idx = 6'd5; sc_ok = 1; #1;
    chk("sc ok write", 32'(dc_req), 1);
    chk("sc ok addr", dc_addr, 32'h400);
    chk("sc ok word", dc_word, 32'h9);
    chk("sc ok waits for cache", 32'(sc_done), 0);
    dc_ack = 1; #1;
    chk("sc ok done", 32'(sc_done), 1);
    @(posedge clk); #1 dc_ack = 0; head_sc = 0; sc_ok = 0;
    chk("sc ok value", sc_res.value, 0);
    chk("sc ok valid", 32'(sc_res.valid), 1);
    chk("empty after sc", 32'(free), SQ_SZ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
