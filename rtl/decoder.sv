// decoder: turns one fetched RV32IM instruction into the internal dec_t packet.
// Purely combinational. Besides the base integer set and the multiply instructions it
// recognises the three instructions the two-thread programs need: csrr of mhartid,
// which becomes "addi rd, x0, <thread id>", and lr.w / sc.w for locks. wfi marks the end
// of a thread's program. Division, fences and other CSRs are not part of this design and
// decode as no-operations. The thread id is an input so that each thread's decoder
// answers csrr with its own hart number.
module decoder
  import cpu_pkg::*;
(
  input  logic       valid_i,
  input  logic       tid_i,
  input  fetch_pkt_t pkt_i,
  output dec_t       dec_o
);
  logic [31:0] in;
  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [6:0]  f7;
  word_t imm_i, imm_s, imm_b, imm_u, imm_j;

  assign in    = pkt_i.inst;
  assign opc   = in[6:0];
  assign f3    = in[14:12];
  assign f7    = in[31:25];
  assign imm_i = {{20{in[31]}}, in[31:20]};
  assign imm_s = {{20{in[31]}}, in[31:25], in[11:7]};
  assign imm_b = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
  assign imm_u = {in[31:12], 12'b0};
  assign imm_j = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};

  always_comb begin
    dec_o          = '0;
    dec_o.valid    = valid_i;
    dec_o.pc       = pkt_i.pc;
    dec_o.pred_npc = pkt_i.pred_npc;
    dec_o.fu       = FU_ALU;
    dec_o.alu_op   = ALU_ADD;
    dec_o.op1_sel  = OP1_RS1;
    dec_o.rs1      = in[19:15];
    dec_o.rs2      = in[24:20];
    dec_o.rd       = in[11:7];
    dec_o.funct3   = f3;
    dec_o.cf       = CF_NONE;
    unique case (opc)
      7'b0110111: begin // lui
        dec_o.op1_sel = OP1_ZERO; dec_o.op2_imm = 1'b1; dec_o.imm = imm_u; dec_o.has_dest = 1'b1;
      end
      7'b0010111: begin // auipc
        dec_o.op1_sel = OP1_PC; dec_o.op2_imm = 1'b1; dec_o.imm = imm_u; dec_o.has_dest = 1'b1;
      end
      7'b1101111: begin // jal
        dec_o.cf = CF_JAL; dec_o.imm = imm_j; dec_o.has_dest = 1'b1; dec_o.op2_imm = 1'b1;
      end
      7'b1100111: begin // jalr
        dec_o.cf = CF_JALR; dec_o.imm = imm_i; dec_o.has_dest = 1'b1; dec_o.use_rs1 = 1'b1;
        dec_o.op2_imm = 1'b1;
      end
      7'b1100011: begin // conditional branches
        dec_o.cf = CF_BR; dec_o.imm = imm_b; dec_o.use_rs1 = 1'b1; dec_o.use_rs2 = 1'b1;
      end
      7'b0000011: begin // loads
        dec_o.fu = FU_LOAD; dec_o.imm = imm_i; dec_o.use_rs1 = 1'b1; dec_o.has_dest = 1'b1;
        dec_o.op2_imm = 1'b1;
      end
      7'b0100011: begin // stores
        dec_o.fu = FU_STORE; dec_o.imm = imm_s; dec_o.use_rs1 = 1'b1; dec_o.use_rs2 = 1'b1;
      end
      7'b0010011: begin // register-immediate arithmetic
        dec_o.op2_imm = 1'b1; dec_o.imm = imm_i; dec_o.use_rs1 = 1'b1; dec_o.has_dest = 1'b1;
        unique case (f3)
          3'b000: dec_o.alu_op = ALU_ADD;
          3'b001: dec_o.alu_op = ALU_SLL;
          3'b010: dec_o.alu_op = ALU_SLT;
          3'b011: dec_o.alu_op = ALU_SLTU;
          3'b100: dec_o.alu_op = ALU_XOR;
          3'b101: dec_o.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: dec_o.alu_op = ALU_OR;
          default: dec_o.alu_op = ALU_AND;
        endcase
      end
      7'b0110011: begin // register-register arithmetic and multiply
        dec_o.use_rs1 = 1'b1; dec_o.use_rs2 = 1'b1; dec_o.has_dest = 1'b1;
        if (f7 == 7'b0000001) begin
          if (!f3[2]) dec_o.fu = FU_MULT;
          else dec_o.has_dest = 1'b0;  // division is not supported
        end else begin
          unique case (f3)
            3'b000: dec_o.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
            3'b001: dec_o.alu_op = ALU_SLL;
            3'b010: dec_o.alu_op = ALU_SLT;
            3'b011: dec_o.alu_op = ALU_SLTU;
            3'b100: dec_o.alu_op = ALU_XOR;
            3'b101: dec_o.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            3'b110: dec_o.alu_op = ALU_OR;
            default: dec_o.alu_op = ALU_AND;
          endcase
        end
      end
      7'b0101111: begin // atomics: only lr.w and sc.w
        if (f3 == 3'b010 && in[31:27] == 5'b00010) begin
          dec_o.fu = FU_LOAD; dec_o.is_lr = 1'b1; dec_o.use_rs1 = 1'b1; dec_o.has_dest = 1'b1;
        end else if (f3 == 3'b010 && in[31:27] == 5'b00011) begin
          dec_o.fu = FU_STORE; dec_o.is_sc = 1'b1; dec_o.use_rs1 = 1'b1; dec_o.use_rs2 = 1'b1;
          dec_o.has_dest = 1'b1;
        end
      end
      7'b1110011: begin // system: csrr (mhartid) and wfi
        if (in == 32'h1050_0073) dec_o.halt = 1'b1;
        else if (f3 == 3'b010) begin
          // csrr rd, mhartid is executed as addi rd, x0, <hart id>
          dec_o.op1_sel = OP1_ZERO; dec_o.op2_imm = 1'b1; dec_o.has_dest = 1'b1;
          dec_o.imm = {31'b0, tid_i};
        end
      end
      default: ;
    endcase
    if (dec_o.rd == 5'd0) dec_o.has_dest = 1'b0;
    dec_o.funct3 = dec_o.is_lr || dec_o.is_sc ? 3'b010 : f3;
  end
endmodule
