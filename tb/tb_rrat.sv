// tb_rrat: self-checking test of the retirement register alias table.
// Retires up to two instructions per cycle against a reference map; checks the old
// mapping returned for freeing (including a second retire to the same register in one
// cycle) and the next-state map used for recovery. Prints TB_RESULT.
module tb_rrat;
  import cpu_pkg::*;
  logic clk = 0, rst = 1;
  logic v [2];
  logic [4:0] rd [2];
  prn_t p [2], op [2], mn [32], refm [32];
  int checks = 0, failures = 0;
  rrat dut (.clk, .rst, .valid_i(v), .rd_i(rd), .prn_i(p), .old_prn_o(op), .map_next_o(mn));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  initial begin
    v = '{0, 0}; rd = '{0, 0}; p = '{0, 0};
    for (int i = 0; i < 32; i++) refm[i] = prn_t'(i);
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      prn_t m [32];
      for (int k = 0; k < 2; k++) begin
        v[k] = $urandom_range(0, 3) != 0; rd[k] = 5'($urandom_range(1, 31));
        p[k] = prn_t'($urandom_range(32, 95));
      end
      if (n % 5 == 0) rd[1] = rd[0];
      #1;
      m = refm;
      if (v[0]) begin chk("old prn 0", 32'(op[0]), 32'(m[rd[0]])); m[rd[0]] = p[0]; end
      if (v[1]) begin chk("old prn 1", 32'(op[1]), 32'(m[rd[1]])); m[rd[1]] = p[1]; end
      for (int i = 0; i < 32; i++) chk("next map", 32'(mn[i]), 32'(m[i]));
      @(posedge clk); #1;
      refm = m;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
