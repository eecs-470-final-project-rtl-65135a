// tb_dcache: self-checking test of the non-blocking data cache with the memory model.
// Random word/byte stores and loads over 48 lines (more than the 32 the cache holds, so
// lines are evicted and dirty ones written back) are checked against a reference memory.
// A load that misses waits for the fill broadcast of its line. Some loads follow a store
// miss to the same line at once, so they join its MSHR and must see the merged bytes.
// At the end every line is compared (cache copy if present, else memory). Counts hits,
// misses, MSHR merges and write-backs and fails if one never happened. Prints TB_RESULT.
module tb_dcache;
  import cpu_pkg::*;
  logic clk = 0, rst = 1;
  logic ld_req = 0, ld_hit, ld_acc, st_req = 0, st_ack, fill_v, mreq, mack;
  word_t ld_addr = '0, st_addr = '0, st_word = '0, fill_addr, maddr;
  logic [3:0] st_be = '0;
  logic [63:0] ld_line, fill_line, mdata, rdata;
  mem_cmd_t mcmd, pcmd;
  logic [MEM_TAG_W-1:0] resp, rtag;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_merge = 0, n_wb = 0;
  logic [7:0] refm [logic [31:0]];
  logic [63:0] init [8192];            // memory contents before the test

  dcache dut (.clk, .rst, .ld_req_i(ld_req), .ld_addr_i(ld_addr), .ld_hit_o(ld_hit),
              .ld_acc_o(ld_acc), .ld_line_o(ld_line), .st_req_i(st_req), .st_addr_i(st_addr),
              .st_word_i(st_word), .st_be_i(st_be), .st_ack_o(st_ack), .fill_v_o(fill_v),
              .fill_addr_o(fill_addr), .fill_line_o(fill_line), .mem_req_o(mreq),
              .mem_cmd_o(mcmd), .mem_addr_o(maddr), .mem_data_o(mdata), .mem_ack_i(mack),
              .mem_tag_i(resp), .mem_rtag_i(rtag), .mem_rdata_i(rdata));
  assign pcmd = mreq ? mcmd : MEM_CMD_NONE;
  assign mack = mreq && resp != '0;
  mem_model mem (.clk, .rst, .proc2mem_command(pcmd), .proc2mem_addr(maddr), .proc2mem_data(mdata),
                 .mem2proc_response(resp), .mem2proc_data(rdata), .mem2proc_tag(rtag));
  always #5 clk = ~clk;
  initial begin #2000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  always @(posedge clk) if (!rst && mack && mcmd == MEM_CMD_STORE) n_wb++;

  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  function automatic logic [7:0] rb(word_t a); return refm.exists(a) ? refm[a] : init[a[15:3]][8*a[2:0] +: 8]; endfunction
  function automatic word_t rw(word_t a);
    return {rb({a[31:2], 2'd3}), rb({a[31:2], 2'd2}), rb({a[31:2], 2'd1}), rb({a[31:2], 2'd0})};
  endfunction
  function automatic word_t pick(logic [63:0] l, word_t a); return a[2] ? l[63:32] : l[31:0]; endfunction

  task automatic do_store(word_t a, word_t w, logic [3:0] be, output logic missed);
    st_req = 1; st_addr = a; st_word = w; st_be = be; #1;
    while (!st_ack) begin @(posedge clk); #1; end
    missed = !dut.st_hit;
    @(posedge clk); #1 st_req = 0;
    for (int k = 0; k < 4; k++) if (be[k]) refm[{a[31:2], 2'(k)}] = w[8*k +: 8];
  endtask
  task automatic do_load(word_t a);
    word_t got;
    ld_req = 1; ld_addr = a; #1;
    while (!ld_hit && !ld_acc) begin @(posedge clk); #1; end
    if (ld_hit) begin got = pick(ld_line, a); n_hit++; @(posedge clk); #1 ld_req = 0; end
    else begin
      @(posedge clk); #1 ld_req = 0;
      while (!(fill_v && fill_addr[31:3] == a[31:3])) begin @(posedge clk); #1; end
      got = pick(fill_line, a); n_miss++;
      @(posedge clk); #1;
    end
    chk("load value", got, rw(a));
  endtask

  initial begin
    logic m;
    repeat (3) @(posedge clk); #1 rst = 0;
    init = mem.mem;
    for (int n = 0; n < 600; n++) begin
      word_t a;
      a = 32'h4000 + 32'($urandom_range(0, 47)) * 8 + 32'($urandom_range(0, 1)) * 4;
      case ($urandom_range(0, 2))
        0: do_load(a);
        1: begin
          do_store(a, $urandom, 4'b1111, m);
          if (m) begin do_load(a); n_merge++; end     // joins the store's MSHR
        end
        default: do_store(a, $urandom, 4'b0001 << $urandom_range(0, 3), m);
      endcase
    end
    repeat (40) @(posedge clk);
    for (int l = 0; l < 48; l++) begin
      word_t a;
      logic [63:0] line;
      a = 32'h4000 + 32'(l) * 8;
      line = mem.mem[a[15:3]];
      for (int w = 0; w < 4; w++)
        if (dut.lines[a[5:3]][w].valid && dut.lines[a[5:3]][w].tag == a[31:6]) line = dut.lines[a[5:3]][w].data;
      chk("final low word", line[31:0], rw(a)); chk("final high word", line[63:32], rw(a + 4));
    end
    $display("hits=%0d misses=%0d merges=%0d writebacks=%0d", n_hit, n_miss, n_merge, n_wb);
    chk("hits happened", 32'(n_hit > 0), 1); chk("misses happened", 32'(n_miss > 0), 1);
    chk("MSHR merges happened", 32'(n_merge > 0), 1); chk("write-backs happened", 32'(n_wb > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
