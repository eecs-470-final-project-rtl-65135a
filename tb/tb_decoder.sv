// tb_decoder: self-checking test of the instruction decoder.
// Encodes one instruction of each class (register and immediate arithmetic, lui, loads,
// stores, branches, jal, jalr, mul, lr.w, sc.w, csrr mhartid, wfi) and checks the
// decoded unit, operation, registers, immediate and control-flow kind. Prints TB_RESULT.
module tb_decoder;
  import cpu_pkg::*;
  import rv_asm::*;
  fetch_pkt_t pk;
  logic tid;
  dec_t d;
  int checks = 0, failures = 0;
  decoder dut (.valid_i(1'b1), .tid_i(tid), .pkt_i(pk), .dec_o(d));
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  task automatic dec(logic [31:0] i, logic t = 0);
    pk = '0; pk.inst = i; pk.pc = 32'h40; pk.pred_npc = 32'h44; tid = t; #1;
  endtask
  initial begin
    dec(addi(5, 6, -3));
    chk("addi fu", 32'(d.fu), 32'(FU_ALU)); chk("addi op", 32'(d.alu_op), 32'(ALU_ADD));
    chk("addi imm", d.imm, 32'hFFFF_FFFD); chk("addi rd", 32'(d.rd), 5); chk("addi rs1", 32'(d.rs1), 6);
    chk("addi dest", 32'(d.has_dest), 1); chk("addi uses imm", 32'(d.op2_imm), 1);
    dec(sub(1, 2, 3));
    chk("sub op", 32'(d.alu_op), 32'(ALU_SUB)); chk("sub rs2", 32'(d.rs2), 3); chk("sub uses rs2", 32'(d.use_rs2), 1);
    dec(xor_(1, 2, 3)); chk("xor op", 32'(d.alu_op), 32'(ALU_XOR));
    dec(slli(1, 2, 7)); chk("slli op", 32'(d.alu_op), 32'(ALU_SLL));
    dec(lui(9, 20'h12345)); chk("lui imm", d.imm, 32'h1234_5000);
    dec(lw(4, 8, 16));
    chk("lw fu", 32'(d.fu), 32'(FU_LOAD)); chk("lw imm", d.imm, 16); chk("lw f3", 32'(d.funct3), 2);
    dec(sw(4, 8, -8));
    chk("sw fu", 32'(d.fu), 32'(FU_STORE)); chk("sw imm", d.imm, 32'hFFFF_FFF8);
    chk("sw no dest", 32'(d.has_dest), 0); chk("sw rs2", 32'(d.rs2), 4);
    dec(blt(3, 4, -16));
    chk("blt cf", 32'(d.cf), 32'(CF_BR)); chk("blt imm", d.imm, 32'hFFFF_FFF0); chk("blt f3", 32'(d.funct3), 4);
    chk("blt no dest", 32'(d.has_dest), 0);
    dec(jal(1, 2048)); chk("jal cf", 32'(d.cf), 32'(CF_JAL)); chk("jal imm", d.imm, 2048);
    chk("jal dest", 32'(d.has_dest), 1);
    dec(jalr(0, 1, 0)); chk("jalr cf", 32'(d.cf), 32'(CF_JALR)); chk("jalr rd0 no dest", 32'(d.has_dest), 0);
    dec(mul(7, 8, 9)); chk("mul fu", 32'(d.fu), 32'(FU_MULT));
    dec(mulh(7, 8, 9)); chk("mulh f3", 32'(d.funct3), 1);
    dec(lr_w(3, 10)); chk("lr fu", 32'(d.fu), 32'(FU_LOAD)); chk("lr flag", 32'(d.is_lr), 1);
    dec(sc_w(3, 4, 10)); chk("sc fu", 32'(d.fu), 32'(FU_STORE)); chk("sc flag", 32'(d.is_sc), 1);
    chk("sc has result", 32'(d.has_dest), 1);
    dec(csrr_mhartid(12), 1);
    chk("hartid is addi", 32'(d.alu_op), 32'(ALU_ADD)); chk("hartid imm", d.imm, 1);
    chk("hartid from x0", 32'(d.op1_sel == OP1_ZERO || d.rs1 == 0), 1);
    dec(wfi()); chk("wfi halts", 32'(d.halt), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
