// tb_cpu: end-to-end test of the two-thread core with every parameter at its default.
// A program is assembled into the memory model. Both threads start at address 0 and
// split on csrr mhartid:
//   thread 0: fills an array with i*i+7 (multiplier, stores), sums it back (loads),
//             stores a product behind a missing load and reads it straight back
//             (store-to-load forwarding), calls a function five times with jal / return
//             (return address stack), calls it three more times through jalr (branch
//             target buffer), then runs the shared lock loop.
//   thread 1: writes and reads back bytes at a 64-byte stride so that six lines
//             compete for one 4-way data-cache set (misses, dirty evictions), checks mulh,
//             then runs the shared lock loop.
//   lock loop: LOOPS times lr.w / sc.w on a lock word, increment a shared counter,
//             release the lock (the two-thread counter test of the design).
// The program is padded so that the code conflicts in the 256-byte instruction cache.
// At the end the results are read back (data cache first, then memory) and compared
// with values computed here. The test also counts how often each mechanism of the
// design happened and fails if one never did, including the peak rates: four
// instructions fetched, two dispatched and four retired in one cycle.
module tb_cpu;
  import cpu_pkg::*;
  import rv_asm::*;

  localparam int LOOPS = 20;
  localparam int N0 = 24;

  logic clk = 1'b0, rst = 1'b1;
  mem_cmd_t cmd; word_t addr; logic [63:0] wdata, rdata;
  logic [MEM_TAG_W-1:0] resp, rtag;
  logic [NT-1:0] halted;
  logic [31:0] retired [NT];
  int checks = 0, failures = 0;

  cpu dut (.clk, .rst, .proc2mem_command(cmd), .proc2mem_addr(addr), .proc2mem_data(wdata),
           .mem2proc_response(resp), .mem2proc_data(rdata), .mem2proc_tag(rtag),
           .halted_o(halted), .retired_o(retired));
  mem_model mem (.clk, .rst, .proc2mem_command(cmd), .proc2mem_addr(addr),
                 .proc2mem_data(wdata), .mem2proc_response(resp), .mem2proc_data(rdata),
                 .mem2proc_tag(rtag));

  always #5 clk = ~clk;

  // ------------------------------------------------------------ program
  int lbl [string];
  int pc;
  logic [31:0] prog [1024];
  function automatic void emit(logic [31:0] i); prog[pc/4] = i; pc += 4; endfunction
  function automatic void label(string n); lbl[n] = pc; endfunction
  function automatic int off(string n); return lbl.exists(n) ? lbl[n] - pc : 0; endfunction
  function automatic int at(string n); return lbl.exists(n) ? lbl[n] : 0; endfunction

  function automatic void assemble();
    pc = 0;
    emit(csrr_mhartid(1));
    emit(bne(1, 0, off("T1")));
    // ---- thread 0
    emit(lui(10, 2));                 // x10 = 0x2000
    emit(addi(3, 0, 0));
    emit(addi(4, 0, N0));
    label("L1");
    emit(slli(5, 3, 2)); emit(add(5, 10, 5)); emit(mul(6, 3, 3)); emit(addi(6, 6, 7));
    emit(sw(6, 5, 0)); emit(addi(3, 3, 1)); emit(blt(3, 4, off("L1")));
    emit(addi(3, 0, 0)); emit(addi(7, 0, 0));
    label("L2");
    emit(slli(5, 3, 2)); emit(add(5, 10, 5)); emit(lw(6, 5, 0)); emit(add(7, 7, 6));
    emit(addi(3, 3, 1)); emit(blt(3, 4, off("L2")));
    emit(sw(7, 10, 256));
    emit(mul(16, 7, 3)); emit(lw(18, 10, 512));   // a missing load holds the store below in the queue
    emit(sw(16, 10, 268)); emit(lw(15, 10, 268));     // forwarded
    emit(addi(15, 15, 1)); emit(sw(15, 10, 264));
    emit(addi(8, 0, 0)); emit(addi(9, 0, 5));
    label("L3");
    emit(jal(1, off("F"))); emit(addi(9, 9, -1)); emit(bne(9, 0, off("L3")));
    emit(addi(11, 0, at("F"))); emit(addi(9, 0, 3));
    label("L6");
    emit(jalr(1, 11, 0)); emit(addi(9, 9, -1)); emit(bne(9, 0, off("L6")));
    emit(sw(8, 10, 260));
    emit(jal(0, off("LOCK")));
    label("F");
    emit(addi(8, 8, 3)); emit(jalr(0, 1, 0));
    // padding: pushes the lock loop into lines that conflict with the code above
    for (int i = 0; i < 40; i++) emit(addi(0, 0, 0));
    // ---- thread 1
    label("T1");
    emit(lui(10, 3));                 // x10 = 0x3000
    emit(addi(3, 0, 0)); emit(addi(4, 0, 6));
    label("L4");
    emit(slli(5, 3, 6)); emit(add(5, 10, 5)); emit(addi(6, 3, 100)); emit(sb(6, 5, 1));
    emit(addi(3, 3, 1)); emit(blt(3, 4, off("L4")));
    emit(addi(3, 0, 0)); emit(addi(7, 0, 0));
    label("L5");
    emit(slli(5, 3, 6)); emit(add(5, 10, 5)); emit(lbu(6, 5, 1)); emit(add(7, 7, 6));
    emit(addi(3, 3, 1)); emit(blt(3, 4, off("L5")));
    emit(sw(7, 10, 2032));
    emit(lui(12, 32'h80000)); emit(addi(13, 0, 3)); emit(mulh(14, 12, 13)); emit(sw(14, 10, 2036));
    emit(jal(0, off("LOCK")));
    for (int i = 0; i < 30; i++) emit(addi(0, 0, 0));
    // ---- shared lock loop
    label("LOCK");
    emit(addi(21, 0, 0)); emit(addi(22, 0, LOOPS)); emit(lui(20, 1));   // x20 = 0x1000
    label("LL");
    emit(lr_w(23, 20)); emit(bne(23, 0, off("LL")));
    emit(addi(24, 0, 1)); emit(sc_w(25, 24, 20)); emit(bne(25, 0, off("LL")));
    emit(lw(26, 20, 4)); emit(addi(26, 26, 1)); emit(sw(26, 20, 4)); emit(sw(0, 20, 0));
    emit(addi(21, 21, 1)); emit(blt(21, 22, off("LL")));
    emit(wfi());
  endfunction

  // read a word as the program sees it: data cache if present, else memory
  function automatic word_t peek(word_t a);
    logic [63:0] l;
    l = mem.mem[a[15:3]];
    for (int w = 0; w < 4; w++)
      if (dut.u_dcache.lines[a[5:3]][w].valid && dut.u_dcache.lines[a[5:3]][w].tag == a[31:6])
        l = dut.u_dcache.lines[a[5:3]][w].data;
    return a[2] ? l[63:32] : l[31:0];
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%08h) expected %0d", what, got, got, exp);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_mispred, n_ras_pop, n_btb_hit, n_fwd, n_ld_miss, n_mshr_merge, n_wb, n_pf, n_victim,
      n_sc_fail, n_sc_ok, n_both, n_disp_stall, n_back2back, n_mult, n_icmiss;
  // peak rates: 4 fetched (2 per thread), 2 dispatched, 4 retired (2 per thread) per cycle
  int n_fetch4, n_disp2, n_ret4, n_ret_total;
  always @(posedge clk) if (!rst) begin
    int nf, nr;
    nf = 0; nr = 0;
    for (int t = 0; t < NT; t++) for (int k = 0; k < 2; k++) begin
      nf += int'(dut.f_v[t][k]); nr += int'(dut.ret[t][k]);
    end
    if (nf == 4) n_fetch4++;
    if (nr == 4) n_ret4++;
    n_ret_total += nr;
    if (dut.gnt_v[0] && dut.gnt_v[1]) n_disp2++;
    for (int t = 0; t < NT; t++) if (dut.flush[t]) n_mispred++;
    if (dut.g_front[0].ras_pop || dut.g_front[1].ras_pop) n_ras_pop++;
    for (int t = 0; t < NT; t++)
      for (int k = 0; k < 2; k++)
        if (dut.f_v[t][k] && dut.f_pkt[t][k].inst[6:0] == 7'h67 && dut.f_pkt[t][k].inst[11:7] != 0 &&
            dut.btb_hit[2*t+k]) n_btb_hit++;
    if (dut.q_valid && dut.q_fwd[dut.q_tid]) n_fwd++;
    if (dut.u_dcache.ld_alloc) n_ld_miss++;
    if (dut.dc_ld_acc && !dut.u_dcache.ld_alloc) n_mshr_merge++;
    if (dut.dcm_req && dut.dcm_ack && dut.dcm_cmd == MEM_CMD_STORE) n_wb++;
    if (dut.pf_issue) n_pf++;
    for (int t = 0; t < NT; t++) begin
      if (dut.sc_done[t] && !dut.sc_ok[t]) n_sc_fail++;
      if (dut.sc_done[t] && dut.sc_ok[t]) n_sc_ok++;
    end
    if (dut.disp_both) n_both++;
    for (int t = 0; t < NT; t++)
      if (dut.dec[t][0].valid && !dut.block[t] && dut.pop[t] == 0) n_disp_stall++;
    // back-to-back: an ALU consumes the value another ALU puts on the bus this cycle
    for (int k = 0; k < 2; k++)
      for (int j = 0; j < 2; j++)
        if (dut.iss_alu[k].valid && dut.alu_q[j].valid && dut.alu_q[j].d.fu == FU_ALU &&
            dut.alu_q[j].d.has_dest &&
            ((dut.iss_alu[k].d.use_rs1 && dut.iss_a1[k] == dut.alu_q[j].dest) ||
             (dut.iss_alu[k].d.use_rs2 && dut.iss_a2[k] == dut.alu_q[j].dest))) n_back2back++;
    if (dut.mul_res.valid && dut.sh_grant[0]) n_mult++;
    for (int t = 0; t < NT; t++) if (dut.ic_v[t] && !dut.ic_hit[t]) n_icmiss++;
    for (int t = 0; t < NT; t++)
      if (dut.ic_v[t] && dut.ic_hit[t] &&
          !(dut.u_icache.cv[dut.ic_pc[t][7:3]] && dut.u_icache.ctag[dut.ic_pc[t][7:3]] == dut.ic_pc[t][31:8]))
        n_victim++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // ------------------------------------------------------------ run
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog: halted=%b retired=%0d/%0d", halted, retired[0], retired[1]);
    $display("rob0 head=%0d cnt=%0d pc=%h done=%b store=%b sc=%b st_ready=%b sq head=%0d cmt=%0d tail=%0d",
      dut.g_thr[0].u_rob.head, dut.g_thr[0].u_rob.cnt, dut.g_thr[0].u_rob.ent[dut.g_thr[0].u_rob.head].pc,
      dut.g_thr[0].u_rob.ent[dut.g_thr[0].u_rob.head].done, dut.g_thr[0].u_rob.ent[dut.g_thr[0].u_rob.head].store,
      dut.g_thr[0].u_rob.ent[dut.g_thr[0].u_rob.head].sc, dut.st_ready[0],
      dut.g_thr[0].u_sq.head, dut.g_thr[0].u_sq.cmt, dut.g_thr[0].u_sq.tail);
    for (int m = 0; m < 4; m++) $display("mshr%0d v=%b sent=%b tag=%0d la=%h", m, dut.u_dcache.mshr[m].valid, dut.u_dcache.mshr[m].sent, dut.u_dcache.mshr[m].mtag, dut.u_dcache.mshr[m].laddr);
    $display("wq=%0d lbpick=%b %0d qwait=%b %b", dut.u_dcache.wq_cnt, dut.u_lb.pick_v, dut.u_lb.pick, dut.q_wait[0], dut.q_wait[1]);
    for (int i = 0; i < LB_SZ; i++) $display("lb%0d sqt=%0d v=%b st=%0d tid=%b addr=%h", i, dut.u_lb.ent[i].rob_idx, dut.u_lb.ent[i].sqt, dut.u_lb.ent[i].valid, dut.u_lb.ent[i].st, dut.u_lb.ent[i].tid, dut.u_lb.ent[i].addr);
    for (int i = 0; i < RS_SZ; i++) if (dut.u_rs.ent[i].valid) $display("rs%0d pc=%h r=%b%b", i, dut.u_rs.ent[i].d.pc, dut.u_rs.ent[i].rdy1, dut.u_rs.ent[i].rdy2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum0, exp_f, exp_sum1, start, insts;
    assemble();
    assemble();                      // second pass resolves forward labels
    for (int i = 0; i < 8192; i++) mem.mem[i] = '0;
    for (int i = 0; i < pc / 4; i++)
      if (i % 2 == 0) mem.mem[i/2][31:0] = prog[i]; else mem.mem[i/2][63:32] = prog[i];
    repeat (3) @(posedge clk);
    rst = 1'b0;
    start = cycles;
    wait (halted == 2'b11);
    repeat (5) @(posedge clk);
    insts = retired[0] + retired[1];
    exp_sum0 = 0;
    for (int i = 0; i < N0; i++) exp_sum0 += i * i + 7;
    exp_f = 0;
    for (int i = 0; i < 8; i++) exp_f += 3;
    exp_sum1 = 0;
    for (int i = 0; i < 6; i++) exp_sum1 += i + 100;
    for (int i = 0; i < N0; i++) check($sformatf("array[%0d]", i), peek(32'h2000 + 4*i), i*i + 7);
    check("thread 0 sum", peek(32'h2100), exp_sum0);
    check("thread 0 calls", peek(32'h2104), exp_f);
    check("thread 0 forwarded", peek(32'h2108), exp_sum0 * N0 + 1);
    for (int i = 0; i < 6; i++)
      check($sformatf("byte[%0d]", i), (peek(32'h3000 + 64*i) >> 8) & 32'hff, i + 100);
    check("thread 1 sum", peek(32'h37F0), exp_sum1);
    check("mulh", peek(32'h37F4), 32'hFFFF_FFFE);
    check("shared counter", peek(32'h1004), 2 * LOOPS);
    check("lock released", peek(32'h1000), 0);
    need("branch misprediction recovery", n_mispred);
    need("return address stack pop", n_ras_pop);
    need("branch target buffer hit", n_btb_hit);
    need("store-to-load forwarding", n_fwd);
    need("4 instructions fetched in one cycle", n_fetch4);
    need("2 instructions dispatched in one cycle", n_disp2);
    need("4 instructions retired in one cycle", n_ret4);
    need("data cache miss (MSHR allocated)", n_ld_miss);
    need("miss merged into an MSHR", n_mshr_merge);
    need("dirty write-back", n_wb);
    need("instruction prefetch", n_pf);
    need("victim cache hit", n_victim);
    need("sc.w success", n_sc_ok);
    need("dispatch from both threads in one cycle", n_both);
    need("dispatch stall", n_disp_stall);
    need("back-to-back dependent issue (early tag broadcast)", n_back2back);
    need("multiplier result", n_mult);
    $display("cycles=%0d instructions=%0d CPI=%0.3f", cycles - start, insts,
             real'(cycles - start) / real'(insts));
    $display("mispred=%0d ras=%0d btb=%0d fwd=%0d ldmiss=%0d merge=%0d wb=%0d pf=%0d victim=%0d sc_ok=%0d sc_fail=%0d both=%0d stall=%0d b2b=%0d mult=%0d icmiss=%0d",
             n_mispred, n_ras_pop, n_btb_hit, n_fwd, n_ld_miss, n_mshr_merge, n_wb, n_pf, n_victim,
             n_sc_ok, n_sc_fail, n_both, n_disp_stall, n_back2back, n_mult, n_icmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
