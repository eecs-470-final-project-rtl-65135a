// tb_rat: self-checking test of the register alias table.
// Renames two instructions per cycle against a reference map, including a second
// instruction that reads the first one's destination in the same bundle (forwarding) and
// two writes of the same register, and checks that recovery loads the retirement map.
// Prints TB_RESULT.
module tb_rat;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, rec = 0;
  logic v [2], hd [2];
  logic [4:0] r1 [2], r2 [2], rd [2];
  prn_t np [2], p1 [2], p2 [2], rr [32];
  prn_t refm [32];
  int checks = 0, failures = 0;
  rat dut (.clk, .rst, .valid_i(v), .rs1_i(r1), .rs2_i(r2), .rd_i(rd), .has_dest_i(hd),
           .new_prn_i(np), .rs1_prn_o(p1), .rs2_prn_o(p2), .recover_i(rec), .rrat_i(rr));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  initial begin
    v = '{0, 0}; hd = '{0, 0}; r1 = '{0, 0}; r2 = '{0, 0}; rd = '{0, 0}; np = '{0, 0};
    for (int i = 0; i < 32; i++) begin refm[i] = prn_t'(i); rr[i] = prn_t'(95 - i); end
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      prn_t e1, e2;
      for (int k = 0; k < 2; k++) begin
        v[k] = $urandom_range(0, 3) != 0; hd[k] = $urandom_range(0, 1);
        r1[k] = 5'($urandom); r2[k] = 5'($urandom); rd[k] = 5'($urandom_range(1, 31));
        np[k] = prn_t'($urandom_range(32, 95));
      end
      if (n % 7 == 0) begin r1[1] = rd[0]; rd[1] = rd[0]; end
      #1;
      chk("slot0 rs1", 32'(p1[0]), 32'(refm[r1[0]]));
      chk("slot0 rs2", 32'(p2[0]), 32'(refm[r2[0]]));
      e1 = (v[0] && hd[0] && rd[0] == r1[1]) ? np[0] : refm[r1[1]];
      e2 = (v[0] && hd[0] && rd[0] == r2[1]) ? np[0] : refm[r2[1]];
      chk("slot1 rs1 (forwarded)", 32'(p1[1]), 32'(e1));
      chk("slot1 rs2 (forwarded)", 32'(p2[1]), 32'(e2));
      @(posedge clk); #1;
      for (int k = 0; k < 2; k++) if (v[k] && hd[k]) refm[rd[k]] = np[k];
    end
    v = '{0, 0}; rec = 1; @(posedge clk); #1 rec = 0;
    r1[0] = 5; r2[0] = 31; #1;
    chk("recovered 5", 32'(p1[0]), 90);
    chk("recovered 31", 32'(p2[0]), 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
