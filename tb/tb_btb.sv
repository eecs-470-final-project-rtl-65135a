// tb_btb: self-checking test of the branch target buffer.
// Installs jalr targets, looks them up on all four ports, checks misses for unknown PCs,
// that two PCs of the same set live together (2 ways), that a third replaces the least
// recently installed one, and that an update of a present PC changes its target.
// Prints TB_RESULT.
module tb_btb;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, uv = 0;
  word_t lp [4], lt [4], up = '0, ut = '0;
  logic lh [4];
  int checks = 0, failures = 0;
  btb dut (.clk, .rst, .lk_pc_i(lp), .lk_hit_o(lh), .lk_tgt_o(lt), .upd_valid_i(uv),
           .upd_pc_i(up), .upd_tgt_i(ut));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic put(word_t p, word_t t); uv = 1; up = p; ut = t; @(posedge clk); #1 uv = 0; endtask
  localparam word_t SETSTEP = 32'd4 * 32;   // PCs this far apart share a set (32 sets)
  initial begin
    lp = '{default: '0};
    repeat (2) @(posedge clk); #1 rst = 0;
    lp[0] = 32'h100; #1 chk("cold miss", 32'(lh[0]), 0);
    put(32'h100, 32'h800); put(32'h104, 32'h900);
    lp[0] = 32'h100; lp[1] = 32'h104; lp[2] = 32'h108; lp[3] = 32'h100; #1;
    chk("hit port 0", 32'(lh[0]), 1); chk("target port 0", lt[0], 32'h800);
    chk("hit port 1", 32'(lh[1]), 1); chk("target port 1", lt[1], 32'h900);
    chk("miss port 2", 32'(lh[2]), 0); chk("hit port 3", 32'(lh[3]), 1);
    put(32'h100 + SETSTEP, 32'hA00);          // second way of the same set
    lp[0] = 32'h100; lp[1] = 32'h100 + SETSTEP; #1;
    chk("way 0 kept", 32'(lh[0]), 1); chk("way 1 hit", 32'(lh[1]), 1); chk("way 1 target", lt[1], 32'hA00);
    put(32'h100 + 2 * SETSTEP, 32'hB00);      // third: replaces one of them
    lp[0] = 32'h100; lp[1] = 32'h100 + SETSTEP; lp[2] = 32'h100 + 2 * SETSTEP; #1;
    chk("new entry hits", 32'(lh[2]), 1); chk("new entry target", lt[2], 32'hB00);
    chk("exactly one old entry left", 32'(lh[0]) + 32'(lh[1]), 1);
    put(32'h104, 32'hC00); lp[0] = 32'h104; #1;
    chk("target updated", lt[0], 32'hC00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
