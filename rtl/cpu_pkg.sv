// cpu_pkg: shared types and sizes of the two-thread out-of-order RV32IM core.
// The sizes follow the design description (16-entry RS, 64-entry ROB per thread,
// 96 physical registers per thread, 8-entry load buffer and store queue, 16-entry
// instruction queues). The encodings of the internal packets are this design's own.
package cpu_pkg;
  localparam int XLEN     = 32;
  localparam int NT       = 2;          // hardware threads
  localparam int ROB_SZ   = 64;         // per thread
  localparam int NPR      = 32 + ROB_SZ;// physical registers per thread (96)
  localparam int PRN_W    = $clog2(NPR);
  localparam int ROB_W    = $clog2(ROB_SZ);
  localparam int RS_SZ    = 16;
  localparam int LB_SZ    = 8;
  localparam int SQ_SZ    = 8;          // per thread
  localparam int LB_W     = $clog2(LB_SZ);
  localparam int SQ_W     = $clog2(SQ_SZ);
  localparam int CDB_W    = 3;          // result buses
  localparam int MEM_TAG_W = 4;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [PRN_W-1:0] prn_t;

  // physical register name: thread bit plus register number
  typedef struct packed {
    logic tid;
    prn_t prn;
  } tag_t;

  typedef enum logic [1:0] {FU_ALU, FU_MULT, FU_LOAD, FU_STORE} fu_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_t;

  typedef enum logic [1:0] {OP1_RS1, OP1_PC, OP1_ZERO} op1_sel_t;

  typedef enum logic [1:0] {CF_NONE, CF_BR, CF_JAL, CF_JALR} cf_t;

  typedef enum logic [1:0] {MEM_CMD_NONE, MEM_CMD_LOAD, MEM_CMD_STORE} mem_cmd_t;

  // decoded instruction, as it leaves the decoders
  typedef struct packed {
    logic     valid;
    word_t    pc;
    word_t    pred_npc;   // next PC predicted by fetch
    fu_t      fu;
    alu_op_t  alu_op;
    op1_sel_t op1_sel;
    logic     op2_imm;    // operand 2 is the immediate
    word_t    imm;
    logic [4:0] rs1, rs2, rd;
    logic     use_rs1, use_rs2, has_dest;
    cf_t      cf;
    logic [2:0] funct3;   // branch condition, memory size, multiply kind
    logic     is_lr, is_sc;
    logic     halt;       // wfi
  } dec_t;

  // one instruction in fetch -> instruction queue
  typedef struct packed {
    word_t pc;
    word_t inst;
    word_t pred_npc;
  } fetch_pkt_t;

  // result bus
  typedef struct packed {
    logic  valid;
    tag_t  tag;          // destination (tag.prn==0 means none)
    logic  has_dest;
    word_t value;
    logic [ROB_W-1:0] rob_idx;
    logic  mispred;      // control flow resolved differently from the prediction
    logic  taken;
    word_t npc;          // resolved next PC
  } cdb_t;

  // issued operation sent to a functional unit
  typedef struct packed {
    logic  valid;
    logic  tid;
    dec_t  d;
    tag_t  dest;
    logic [ROB_W-1:0] rob_idx;
    logic [LB_W-1:0]  lb_idx;
    word_t a, b;          // operand values (rs1, rs2)
  } fu_in_t;

  function automatic logic br_cond(input logic [2:0] f3, input word_t a, input word_t b);
    case (f3)
      3'b000: return a == b;
      3'b001: return a != b;
      3'b100: return $signed(a) <  $signed(b);
      3'b101: return $signed(a) >= $signed(b);
      3'b110: return a <  b;
      3'b111: return a >= b;
      default: return 1'b0;
    endcase
  endfunction
endpackage
