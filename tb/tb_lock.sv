// tb_lock: self-checking test of the lr.w/sc.w reservation set.
// Checks: an lr.w reserves its word; the matching sc.w check passes only for that word;
// an executed sc.w ends the reservation; a store by the other thread to the word cancels
// it, also in the same cycle as the lr.w; a store by the same thread does not; a flush of
// the thread cancels it. Prints TB_RESULT.
module tb_lock;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, st = 0, st_tid = 0;
  logic lr [NT], ok [NT], dn [NT], fl [NT];
  word_t la [NT], ca [NT], sa = '0;
  int checks = 0, failures = 0;
  lock dut (.clk, .rst, .lr_i(lr), .lr_addr_i(la), .chk_addr_i(ca), .chk_ok_o(ok), .done_i(dn),
            .flush_i(fl), .st_i(st), .st_tid_i(st_tid), .st_addr_i(sa));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic tick(); @(posedge clk); #1; lr = '{0, 0}; dn = '{0, 0}; fl = '{0, 0}; st = 0; endtask
  initial begin
    lr = '{0, 0}; dn = '{0, 0}; fl = '{0, 0}; la = '{32'h1000, 32'h1000}; ca = '{32'h1000, 32'h1000};
    repeat (2) @(posedge clk); #1 rst = 0;
    chk("nothing reserved", 32'(ok[0]), 0);
    lr[0] = 1; tick();
    chk("reserved", 32'(ok[0]), 1); chk("other thread not", 32'(ok[1]), 0);
    ca[0] = 32'h1004; #1 chk("other word fails", 32'(ok[0]), 0); ca[0] = 32'h1000;
    st = 1; st_tid = 0; sa = 32'h1000; tick();
    chk("own store keeps it", 32'(ok[0]), 1);
    st = 1; st_tid = 1; sa = 32'h1008; tick();
    chk("other word store keeps it", 32'(ok[0]), 1);
    st = 1; st_tid = 1; sa = 32'h1000; tick();
    chk("other thread store cancels", 32'(ok[0]), 0);
    lr[0] = 1; tick(); dn[0] = 1; tick();
    chk("sc ends it", 32'(ok[0]), 0);
    lr[1] = 1; st = 1; st_tid = 0; sa = 32'h1000; tick();
    chk("same-cycle store wins", 32'(ok[1]), 0);
    lr[1] = 1; tick(); chk("thread 1 reserved", 32'(ok[1]), 1);
    fl[1] = 1; tick(); chk("flush cancels", 32'(ok[1]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
