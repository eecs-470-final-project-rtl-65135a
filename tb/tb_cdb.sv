// tb_cdb: self-checking test of the result-bus arbiter.
// The two ALU results always pass on buses 0 and 1. The shared producers request bus 2;
// the test checks that exactly one requester is granted, that its result is on bus 2,
// and that priority rotates so every steady requester is served in turn. Prints TB_RESULT.
module tb_cdb;
  import cpu_pkg::*;
  localparam int NSH = 4;
  logic clk = 0, rst = 1;
  cdb_t al [2], sh [NSH], bus [CDB_W];
  logic g [NSH];
  int checks = 0, failures = 0;
  int served [NSH];
  cdb dut (.clk, .rst, .alu_i(al), .sh_i(sh), .sh_grant_o(g), .bus_o(bus));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g_, logic [31:0] e);
    checks++; if (g_ !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g_, e); end
  endtask
  initial begin
    al = '{default: '0}; sh = '{default: '0};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      int ng, w;
      al[0].valid = $urandom_range(0, 1); al[0].value = $urandom;
      al[1].valid = $urandom_range(0, 1); al[1].value = $urandom;
      for (int k = 0; k < NSH; k++) begin
        sh[k].valid = n < 100 ? 1'b1 : 1'($urandom_range(0, 1)); sh[k].value = 32'(k + 100 * n);
      end
      #1;
      chk("alu 0 passes", bus[0].value, al[0].value); chk("alu 0 valid", 32'(bus[0].valid), 32'(al[0].valid));
      chk("alu 1 passes", bus[1].value, al[1].value);
      ng = 0; w = -1;
      for (int k = 0; k < NSH; k++) if (g[k]) begin ng++; w = k; end
      chk("one grant if any request", ng, 32'(sh[0].valid || sh[1].valid || sh[2].valid || sh[3].valid));
      if (w >= 0) begin
        chk("granted requester", 32'(sh[w].valid), 1);
        chk("granted result on bus 2", bus[2].value, sh[w].value);
        served[w]++;
      end else chk("bus 2 idle", 32'(bus[2].valid), 0);
      @(posedge clk); #1;
      if (n == 99) for (int k = 0; k < NSH; k++) chk("rotation shares the bus", served[k], 25);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
