// tb_tournament_bp: self-checking test of the tournament branch predictor.
// Trains one always-taken branch and one never-taken branch and checks they are then
// predicted correctly; trains a branch with a period-3 pattern (taken, taken, not taken)
// that only history-based predictors can learn and checks the accuracy after training;
// checks that the two threads use separate global histories. Prints TB_RESULT.
module tb_tournament_bp;
  import cpu_pkg::*;
  logic clk = 0, rst = 1;
  word_t pp [4], upc [NT];
  logic pt [4], ptk [4], uv [NT], ut [NT];
  int checks = 0, failures = 0;
  tournament_bp dut (.clk, .rst, .pred_pc_i(pp), .pred_tid_i(pt), .pred_taken_o(ptk),
                     .upd_valid_i(uv), .upd_pc_i(upc), .upd_taken_i(ut));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic upd(logic t, word_t pc, logic tk);
    uv = '{0, 0}; uv[t] = 1; upc[t] = pc; ut[t] = tk; @(posedge clk); #1 uv = '{0, 0};
  endtask
  initial begin
    int good;
    pp = '{default: '0}; pt = '{default: '0}; upc = '{0, 0}; uv = '{0, 0}; ut = '{0, 0};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin upd(0, 32'h40, 1); upd(0, 32'h80, 0); end
    pp[0] = 32'h40; pp[1] = 32'h80; #1;
    chk("always taken learned", 32'(ptk[0]), 1); chk("never taken learned", 32'(ptk[1]), 0);
    for (int i = 0; i < 60; i++) upd(1, 32'h200, i % 3 != 2);
    good = 0;
    for (int i = 60; i < 90; i++) begin
      pp[2] = 32'h200; pt[2] = 1; #1;
      if (ptk[2] == (i % 3 != 2)) good++;
      upd(1, 32'h200, i % 3 != 2);
    end
    chk("pattern learned (>= 27 of 30)", 32'(good >= 27), 1);
    pp[0] = 32'h40; pt[0] = 0; #1 chk("thread 0 branch unchanged", 32'(ptk[0]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
