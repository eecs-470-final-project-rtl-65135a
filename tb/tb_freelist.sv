// tb_freelist: self-checking test of the per-thread free list of physical registers.
// After reset registers 32..95 are free. The test allocates until empty, checks that no
// register is given twice and that count_o tracks, frees some back, and checks that
// recovery rebuilds the list as "every register not named by the retirement table".
// Prints TB_RESULT.
module tb_freelist;
  import cpu_pkg::*;
  logic clk = 0, rst = 1, rec = 0;
  prn_t ap [2], fp [2], rr [32];
  logic aok [2], take [2], fr [2];
  logic [$clog2(NPR+1)-1:0] cnt;
  int checks = 0, failures = 0;
  bit used [NPR];
  freelist dut (.clk, .rst, .alloc_prn_o(ap), .alloc_ok_o(aok), .take_i(take), .free_i(fr),
                .free_prn_i(fp), .recover_i(rec), .rrat_i(rr), .count_o(cnt));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  initial begin
    take = '{0, 0}; fr = '{0, 0}; fp = '{default: '0};
    for (int i = 0; i < 32; i++) rr[i] = prn_t'(i);
    repeat (2) @(posedge clk); #1 rst = 0;
    chk("count after reset", 32'(cnt), NPR - 32);
    for (int n = 0; n < 32; n++) begin
      chk("two available", 32'(aok[0] && aok[1]), 1);
      chk("distinct", 32'(ap[0] != ap[1]), 1);
      for (int k = 0; k < 2; k++) begin
        chk("not a reset mapping", 32'(ap[k] >= 32), 1);
        chk("not given twice", 32'(used[ap[k]]), 0);
        used[ap[k]] = 1;
      end
      take = '{1, 1}; @(posedge clk); #1 take = '{0, 0};
    end
    chk("empty", 32'(cnt), 0);
    chk("none available", 32'(aok[0]), 0);
    fr = '{1, 1}; fp[0] = 40; fp[1] = 77; @(posedge clk); #1 fr = '{0, 0};
    chk("count after free", 32'(cnt), 2);
    chk("freed one offered", 32'(ap[0] == 40 || ap[0] == 77), 1);
    for (int i = 0; i < 32; i++) rr[i] = prn_t'(i + 64);   // retirement table now uses 64..95
    rec = 1; @(posedge clk); #1 rec = 0;
    chk("count after recovery", 32'(cnt), NPR - 32 - 1);   // register 0 stays unused
    take = '{1, 0}; chk("recovered list skips retired", 32'(ap[0] >= 1 && ap[0] < 64), 1);
    @(posedge clk); #1 take = '{0, 0};
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
