// alu: single-cycle integer unit. Computes the RV32I arithmetic and logic operations,
// the link value (pc+4) of jal/jalr, resolves conditional branches and jumps, and
// produces the effective address of loads (rs1 + immediate). Combinational: the issue
// stage registers its input, and the result goes onto the common data bus in the same
// cycle it is computed, which is what lets a dependent instruction issue back to back.
// A control-flow instruction reports mispred when the resolved next PC differs from the
// next PC that fetch predicted.
module alu
  import cpu_pkg::*;
(
  input  fu_in_t in_i,
  output cdb_t   res_o,
  output word_t  addr_o      // effective address, used for loads
);
  word_t a, b, r;
  logic  taken;
  word_t npc;

  always_comb begin
    unique case (in_i.d.op1_sel)
      OP1_PC:   a = in_i.d.pc;
      OP1_ZERO: a = '0;
      default:  a = in_i.a;
    endcase
    b = in_i.d.op2_imm ? in_i.d.imm : in_i.b;
    unique case (in_i.d.alu_op)
      ALU_SUB:  r = a - b;
      ALU_SLL:  r = a << b[4:0];
      ALU_SLT:  r = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: r = {31'b0, a < b};
      ALU_XOR:  r = a ^ b;
      ALU_SRL:  r = a >> b[4:0];
      ALU_SRA:  r = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:   r = a | b;
      ALU_AND:  r = a & b;
      ALU_PASSB: r = b;
      default:  r = a + b;
    endcase
    taken = 1'b0;
    npc   = in_i.d.pc + 32'd4;
    unique case (in_i.d.cf)
      CF_BR: begin
        taken = br_cond(in_i.d.funct3, in_i.a, in_i.b);
        if (taken) npc = in_i.d.pc + in_i.d.imm;
      end
      CF_JAL:  begin taken = 1'b1; npc = in_i.d.pc + in_i.d.imm; end
      CF_JALR: begin taken = 1'b1; npc = (in_i.a + in_i.d.imm) & ~32'd1; end
      default: ;
    endcase
    if (in_i.d.cf == CF_JAL || in_i.d.cf == CF_JALR) r = in_i.d.pc + 32'd4;
    addr_o = in_i.a + in_i.d.imm;

    res_o          = '0;
    res_o.valid    = in_i.valid && in_i.d.fu == FU_ALU;
    res_o.tag      = in_i.dest;
    res_o.has_dest = in_i.d.has_dest;
    res_o.value    = r;
    res_o.rob_idx  = in_i.rob_idx;
    res_o.taken    = taken;
    res_o.npc      = npc;
    res_o.mispred  = (in_i.d.cf != CF_NONE) && (npc != in_i.d.pred_npc);
  end
endmodule
