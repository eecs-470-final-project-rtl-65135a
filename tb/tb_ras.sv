// tb_ras: self-checking test of the return address stack.
// Pushes call return addresses, pops them back in reverse order, checks the empty flag,
// a simultaneous push and pop (a call in a function that returns: top is replaced), and
// wrap-around past DEPTH entries (oldest entries are overwritten). Prints TB_RESULT.
module tb_ras;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, push = 0, pop = 0, empty;
  word_t pa = '0, top;
  int checks = 0, failures = 0;
  ras dut (.clk, .rst, .push_i(push), .push_addr_i(pa), .pop_i(pop), .top_o(top), .empty_o(empty));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic step(logic ps, word_t a, logic pp);
    push = ps; pa = a; pop = pp; @(posedge clk); #1; push = 0; pop = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    chk("empty after reset", 32'(empty), 1);
    for (int i = 1; i <= 5; i++) step(1, 32'h100 * i, 0);
    chk("not empty", 32'(empty), 0);
    for (int i = 5; i >= 1; i--) begin chk("pop order", top, 32'h100 * i); step(0, 0, 1); end
    chk("empty again", 32'(empty), 1);
    step(1, 32'hA0, 0); step(1, 32'hB0, 1);          // pop and push together
    chk("replace top", top, 32'hB0); step(0, 0, 1);
    chk("replaced entry gone", 32'(empty), 1);
    for (int i = 0; i < 10; i++) step(1, 32'h1000 + 4 * i, 0);   // overflow by 2
    for (int i = 9; i >= 2; i--) begin chk("after wrap", top, 32'h1000 + 4 * i); step(0, 0, 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
