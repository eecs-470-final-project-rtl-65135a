// tb_prf: self-checking test of one thread's physical register file.
// Allocates registers (ready bit clears), writes results through the three result buses
// (only tags of this thread are taken), and reads them back through the read ports.
// Checks reset state: registers 0..31 ready and zero. Prints TB_RESULT.
module tb_prf;
  import cpu_pkg::*;
  logic clk = 0, rst = 1;
  prn_t rp [8], ap [2];
  word_t rv [8];
  logic rr [8], al [2];
  cdb_t cb [CDB_W];
  int checks = 0, failures = 0;
  prf dut (.clk, .rst, .rd_prn_i(rp), .rd_val_o(rv),
      .rd_rdy_o(rr), .cdb_i(cb), .alloc_i(al), .alloc_prn_i(ap));
  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  initial begin
    cb = '{default: '0}; al = '{0, 0}; ap = '{0, 0}; rp = '{default: '0};
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i += 8) begin
      for (int k = 0; k < 8; k++) rp[k] = prn_t'(i + k);
      #1 for (int k = 0; k < 8; k++) begin chk("reset ready", 32'(rr[k]), 1); chk("reset zero", rv[k], 0); end
    end
    al = '{1, 1}; ap[0] = 40; ap[1] = 41; @(posedge clk); #1 al = '{0, 0};
    rp[0] = 40; rp[1] = 41; #1;
    chk("allocated not ready", 32'(rr[0]), 0); chk("allocated not ready", 32'(rr[1]), 0);
    cb[0].valid = 1; cb[0].has_dest = 1; cb[0].tag.tid = 0; cb[0].tag.prn = 40; cb[0].value = 32'hCAFE;
    cb[2].valid = 1; cb[2].has_dest = 1; cb[2].tag.tid = 1; cb[2].tag.prn = 41; cb[2].value = 32'hBAD;
    @(posedge clk); #1 cb = '{default: '0};
    chk("written", rv[0], 32'hCAFE); chk("ready", 32'(rr[0]), 1);
    chk("other thread ignored", 32'(rr[1]), 0);
    cb[2].valid = 1; cb[2].has_dest = 1; cb[2].tag.tid = 0; cb[2].tag.prn = 41; cb[2].value = 32'h1234;
    cb[1].valid = 1; cb[1].has_dest = 1; cb[1].tag.tid = 0; cb[1].tag.prn = 0; cb[1].value = 32'h77;
    @(posedge clk); #1 cb = '{default: '0};
    chk("bus 2 written", rv[1], 32'h1234); chk("bus 2 ready", 32'(rr[1]), 1);
    rp[2] = 0; #1 chk("x0 stays zero", rv[2], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
