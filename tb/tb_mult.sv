// tb_mult: self-checking test of the pipelined multiplier.
// Sends mul/mulh/mulhsu/mulhu operations with random operands back to back, holds the
// result-bus grant low at times (the pipeline must stall and keep its results), flushes
// one thread, and checks every result and its order against a reference. Prints TB_RESULT.
module tb_mult;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, gnt, stall;
  logic fl [NT];
  fu_in_t in;
  cdb_t r;
  int checks = 0, failures = 0;
  word_t exp_q [$];
  logic [6:0] exp_prn [$];
  logic exp_tid [$];
  mult dut (.clk, .rst, .in_i(in), .grant_i(gnt), .flush_i(fl), .res_o(r), .stall_o(stall));
  always #5 clk = ~clk;
  initial begin #400000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  function automatic word_t ref_mul(logic [2:0] f3, word_t a, word_t b);
    logic signed [63:0] sa, sb;
    logic [63:0] ua, ub;
    logic [127:0] p;
    sa = $signed(a); sb = $signed(b); ua = {32'b0, a}; ub = {32'b0, b};
    case (f3)
      3'd0: p = 128'(sa * sb);
      3'd1: p = 128'(sa * sb);
      3'd2: p = 128'(sa * $signed(ub));
      default: p = 128'(ua * ub);
    endcase
    return f3 == 0 ? p[31:0] : p[63:32];
  endfunction
  int sent = 0, got = 0;
  always @(posedge clk) if (!rst) begin
    if (r.valid && gnt) begin
      chk("result", r.value, exp_q[0]); chk("tag order", 32'(r.tag.prn), 32'(exp_prn[0]));
      void'(exp_q.pop_front()); void'(exp_prn.pop_front()); void'(exp_tid.pop_front());
      got++;
    end
  end
  initial begin
    in = '0; gnt = 0; fl = '{0, 0};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      gnt = $urandom_range(0, 3) != 0; #1;
      in = '0;
      if (!stall && $urandom_range(0, 1)) begin
        in.valid = 1; in.d.fu = FU_MULT; in.d.has_dest = 1; in.d.funct3 = 3'($urandom_range(0, 3));
        in.a = $urandom; in.b = $urandom; if (n % 9 == 0) in.a = 32'hFFFF_FFFF;
        in.dest.prn = prn_t'(sent % 90 + 1); in.tid = 1'b0;
        exp_q.push_back(ref_mul(in.d.funct3, in.a, in.b)); exp_prn.push_back(7'(in.dest.prn));
        exp_tid.push_back(0);
        sent++;
      end
      @(posedge clk); #1;
    end
    in = '0; gnt = 1; repeat (10) @(posedge clk); #1;
    chk("all results came out", got, sent);
    chk("enough operations were accepted", 32'(sent > 80), 1);
    // flush: thread 1 operations in flight vanish
    in.valid = 1; in.d.fu = FU_MULT; in.d.has_dest = 1; in.tid = 1; in.a = 3; in.b = 3;
    @(posedge clk); #1 in = '0; fl[1] = 1; @(posedge clk); #1 fl[1] = 0;
    repeat (6) begin chk("flushed result gone", 32'(r.valid), 0); @(posedge clk); #1; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
