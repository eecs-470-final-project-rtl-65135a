// fetch: instruction fetch of one thread. Each cycle it reads the 8-byte line holding
// its PC from the instruction cache and takes both instructions of the line (only the
// upper one if the PC points at it). It predecodes them to choose the next PC:
//   conditional branch predicted taken, jal : PC + immediate
//   jalr with destination x0 (a return)     : top of the return address stack (pop)
//   other jalr (a call)                     : branch target buffer, else PC + 4
//   otherwise                               : the next line (PC + 8, or PC + 4 from the
//                                             upper slot)
// A taken prediction ends the fetch group. Calls (jal or jalr writing a register) push
// their return address. Fetch stops at wfi and waits for a redirect. A redirect (from a
// retiring mispredicted instruction) replaces the PC. Instructions go to the thread's
// instruction queue with their predicted next PC, and only when it has room for two.
// Pushing on jal calls too, and stopping at wfi, are this design's choices.
module fetch
  import cpu_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  redirect_i,
  input  word_t redirect_pc_i,
  // instruction cache
  output logic  ic_v_o,
  output word_t ic_pc_o,
  input  logic  ic_hit_i,
  input  logic [63:0] ic_line_i,
  // predictors
  output word_t bp_pc_o   [2],
  input  logic  bp_taken_i[2],
  output word_t btb_pc_o  [2],
  input  logic  btb_hit_i [2],
  input  word_t btb_tgt_i [2],
  output logic  ras_push_o,
  output word_t ras_addr_o,
  output logic  ras_pop_o,
  input  word_t ras_top_i,
  input  logic  ras_empty_i,
  // instruction queue
  input  logic  iq_room_i,
  output logic  out_v_o [2],
  output fetch_pkt_t out_o [2],
  output logic  stalled_o
);
  word_t pc;
  logic  halted;
  word_t npc;
  logic  go;
  logic  saw_wfi;

  assign ic_v_o  = !halted;
  assign ic_pc_o = pc;
  assign go      = !halted && ic_hit_i && iq_room_i && !redirect_i;
  assign stalled_o = !halted && !(ic_hit_i && iq_room_i);

  always_comb begin
    logic ended;
    ended = 1'b0;
    saw_wfi = 1'b0;
    npc = {pc[31:3], 3'b0} + 32'd8;
    ras_push_o = 1'b0; ras_pop_o = 1'b0; ras_addr_o = '0;
    for (int k = 0; k < 2; k++) begin
      word_t ipc, in, pn;
      ipc = {pc[31:3], 3'b0} + 32'(4 * k);
      in  = k == 0 ? ic_line_i[31:0] : ic_line_i[63:32];
      bp_pc_o[k]  = ipc;
      btb_pc_o[k] = ipc;
      pn = ipc + 32'd4;
      out_v_o[k] = go && !ended && !(k == 0 && pc[2]);
      if (out_v_o[k]) begin
        unique case (in[6:0])
          7'b1100011: if (bp_taken_i[k])
                        pn = ipc + {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
          7'b1101111: begin
            pn = ipc + {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
            if (in[11:7] != 5'd0) begin ras_push_o = 1'b1; ras_addr_o = ipc + 32'd4; end
          end
          7'b1100111: begin
            if (in[11:7] == 5'd0) begin
              if (!ras_empty_i) begin pn = ras_top_i; ras_pop_o = 1'b1; end
              else if (btb_hit_i[k]) pn = btb_tgt_i[k];
            end else begin
              if (btb_hit_i[k]) pn = btb_tgt_i[k];
              ras_push_o = 1'b1; ras_addr_o = ipc + 32'd4;
            end
          end
          default: ;
        endcase
        if (in == 32'h1050_0073) saw_wfi = 1'b1;
        if (pn != ipc + 32'd4 || saw_wfi) begin ended = 1'b1; npc = pn; end
      end
      out_o[k].pc       = ipc;
      out_o[k].inst     = in;
      out_o[k].pred_npc = pn;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC;
      halted <= 1'b0;
    end else if (redirect_i) begin
      pc <= redirect_pc_i;
      halted <= 1'b0;
    end else if (go) begin
      pc <= npc;
      if (saw_wfi) halted <= 1'b1;
    end
  end
endmodule
