// tb_icache: self-checking test of the instruction cache with the memory model.
// Two fetch streams run at the same time: thread 0 loops over 0x000-0x0FF and thread 1
// over 0x1100-0x111F. Thread 1's four lines map onto thread 0's first four, so the
// threads keep displacing each other's lines (victim cache) and keep missing (prefetching). A stream
// moves to its next 8-byte block after each hit, and jumps back to its start at the end.
// Memory blocks are given distinct contents and every hit is compared with memory. Also checks the memory latency: the first miss
// cannot hit earlier than 13 cycles after it was requested. Counts hits, misses,
// prefetches and victim-cache hits and fails if one never happened. Prints TB_RESULT.
module tb_icache;
  import cpu_pkg::*;
  logic clk = 0, rst = 1;
  logic rv [NT], hit [NT], mreq, mack, pf;
  word_t pc [NT], maddr;
  logic [63:0] line [NT], rdata;
  mem_cmd_t pcmd;
  logic [MEM_TAG_W-1:0] resp, rtag;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_pf = 0, n_victim = 0;
  localparam word_t BASE [NT] = '{32'h0000, 32'h1100};
  localparam word_t LEN  [NT] = '{32'h0100, 32'h0020};

  icache dut (.clk, .rst, .rd_v_i(rv), .rd_pc_i(pc), .hit_o(hit), .line_o(line),
              .mem_req_o(mreq), .mem_addr_o(maddr), .mem_ack_i(mack), .mem_tag_i(resp),
              .mem_rtag_i(rtag), .mem_rdata_i(rdata), .pf_issue_o(pf));
  assign pcmd = mreq ? MEM_CMD_LOAD : MEM_CMD_NONE;
  assign mack = mreq && resp != '0;
  mem_model mem (.clk, .rst, .proc2mem_command(pcmd), .proc2mem_addr(maddr), .proc2mem_data(64'h0),
                 .mem2proc_response(resp), .mem2proc_data(rdata), .mem2proc_tag(rtag));
  always #5 clk = ~clk;
  initial begin #1000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask

  initial begin
    int first_hit;
    rv = '{0, 0}; pc = BASE;
    for (int i = 0; i < 1024; i++) mem.mem[i] = {32'(i) ^ 32'h5a5a0000, ~32'(i)};   // every block differs
    repeat (3) @(posedge clk); #1 rst = 0;
    rv = '{1, 1};
    first_hit = -1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      #1;
      for (int t = 0; t < NT; t++) begin
        if (hit[t]) begin
          if (t == 0 && first_hit < 0) first_hit = cyc;
          chk("fetched line", line[t], mem.mem[pc[t][15:3]]);
          n_hit++;
          if (!(dut.cv[pc[t][7:3]] && dut.ctag[pc[t][7:3]] == pc[t][31:8])) n_victim++;
        end else n_miss++;
      end
      if (pf) n_pf++;
      @(posedge clk);
      for (int t = 0; t < NT; t++)
        if (hit[t]) pc[t] = (pc[t] + 8 == BASE[t] + LEN[t]) ? BASE[t] : pc[t] + 8;
    end
    $display("hits=%0d miss_cycles=%0d prefetches=%0d victim_hits=%0d first_hit=%0d",
             n_hit, n_miss, n_pf, n_victim, first_hit);
    chk("first miss takes at least the memory latency", 64'(first_hit >= 13), 1);
    chk("hits happened", 64'(n_hit > 1000), 1);
    chk("misses happened", 64'(n_miss > 0), 1);
    chk("prefetches happened", 64'(n_pf > 0), 1);
    chk("victim hits happened", 64'(n_victim > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
