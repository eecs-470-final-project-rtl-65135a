// tb_alu: self-checking test of the integer ALU.
// Builds issued operations with the decoder from encoded instructions and checks the
// results of arithmetic, the effective address of loads, branch resolution (taken,
// next PC, misprediction against the fetch prediction) and the link value of jal/jalr.
// Prints TB_RESULT.
module tb_alu;
  import cpu_pkg::*;
  import rv_asm::*;
  fetch_pkt_t pk;
  dec_t d;
  fu_in_t in;
  cdb_t r;
  word_t ad;
  int checks = 0, failures = 0;
  decoder u_dec (.valid_i(1'b1), .tid_i(1'b0), .pkt_i(pk), .dec_o(d));
  alu dut (.in_i(in), .res_o(r), .addr_o(ad));
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic run(logic [31:0] i, word_t a, word_t b, word_t pred = 32'h104);
    pk = '0; pk.inst = i; pk.pc = 32'h100; pk.pred_npc = pred; #1;
    in = '0; in.valid = 1; in.d = d; in.a = a; in.b = b; in.dest.prn = 7; #1;
  endtask
  initial begin
    run(add(1, 2, 3), 5, 7);          chk("add", r.value, 12); chk("valid", 32'(r.valid), 1);
    run(sub(1, 2, 3), 5, 7);          chk("sub", r.value, 32'hFFFF_FFFE);
    run(xor_(1, 2, 3), 32'hF0, 32'hFF); chk("xor", r.value, 32'h0F);
    run(slli(1, 2, 4), 3, 0);         chk("slli", r.value, 48);
    run(addi(1, 2, -1), 10, 0);       chk("addi", r.value, 9);
    run(lui(1, 20'hABCDE), 0, 0);     chk("lui", r.value, 32'hABCD_E000);
    run(lw(1, 2, 12), 32'h2000, 0);   chk("load address", ad, 32'h200C);
    run(beq(1, 2, 32), 4, 4);         chk("beq taken", 32'(r.taken), 1); chk("beq npc", r.npc, 32'h120);
    chk("beq mispredicted", 32'(r.mispred), 1);
    run(beq(1, 2, 32), 4, 5);         chk("beq not taken", 32'(r.taken), 0); chk("beq ok", 32'(r.mispred), 0);
    run(blt(1, 2, -8), -3, 2, 32'hF8); chk("blt signed taken", 32'(r.taken), 1); chk("blt predicted", 32'(r.mispred), 0);
    run(jal(1, 64), 0, 0, 32'h140);   chk("jal link", r.value, 32'h104); chk("jal npc", r.npc, 32'h140);
    chk("jal predicted", 32'(r.mispred), 0);
    run(jalr(1, 5, 4), 32'h300, 0, 32'h200); chk("jalr npc", r.npc, 32'h304); chk("jalr mispredicted", 32'(r.mispred), 1);
    chk("jalr link", r.value, 32'h104);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
