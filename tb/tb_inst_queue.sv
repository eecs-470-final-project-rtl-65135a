// tb_inst_queue: self-checking test of the per-thread instruction queue.
// Pushes one or two packets per cycle, pops 0..2 and compares the head with a
// reference FIFO; checks the room flag when full and that flush empties the queue.
// Prints TB_RESULT.
module tb_inst_queue;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, flush = 0, room;
  logic push [2], hv [2];
  fetch_pkt_t pk [2], hd [2];
  logic [1:0] pop;
  int checks = 0, failures = 0;
  word_t ref_q [$];
  inst_queue dut (.clk, .rst, .flush_i(flush), .push_i(push), .push_pkt_i(pk), .room_o(room),
                  .head_v_o(hv), .head_o(hd), .pop_i(pop));
  always #5 clk = ~clk;
  initial begin #200000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  int seq = 0;
  initial begin
    push = '{0, 0}; pk = '{default: '0}; pop = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      int np, npop;
      // check heads against the reference
      for (int k = 0; k < 2; k++) begin
        chk("head valid", 32'(hv[k]), 32'(ref_q.size() > k));
        if (ref_q.size() > k) chk("head inst", hd[k].inst, ref_q[k]);
      end
      npop = $urandom_range(0, 2); if (npop > ref_q.size()) npop = ref_q.size();
      np = room ? $urandom_range(0, 2) : 0;
      if (cyc > 150 && cyc < 200) npop = 0;           // let it fill up
      pop = 2'(npop);
      for (int k = 0; k < 2; k++) begin
        push[k] = k < np; pk[k].inst = seq + k; pk[k].pc = 4 * (seq + k);
      end
      @(posedge clk); #1;
      for (int k = 0; k < npop; k++) void'(ref_q.pop_front());
      for (int k = 0; k < np; k++) ref_q.push_back(seq + k);
      seq += np;
      chk("room", 32'(room), 32'(ref_q.size() <= 14));
    end
    push = '{0, 0}; pop = 0; flush = 1; @(posedge clk); #1 flush = 0;
    chk("flush empties", 32'(hv[0]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
