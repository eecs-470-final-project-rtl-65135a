// tb_fetch: self-checking directed test of one thread's fetch unit. The bench plays the
// instruction cache (a small word array, with a switch that turns hits off), the
// predictors and the return stack, and checks cycle by cycle:
//  - two sequential instructions per cycle with their predicted next PCs (the peak
//    fetch rate of one 8-byte line per cycle), then the next line;
//  - a predicted-taken branch in the lower slot ends the group and jumps;
//  - jal jumps at once and pushes its return address;
//  - a return (jalr x0) pops the return stack; fetch from an upper-slot PC gives one instruction;
//  - a call through jalr uses the branch target buffer and pushes;
//  - no output and no PC change on a cache miss or a full instruction queue;
//  - wfi ends fetch until a redirect, which restarts it at the new PC.
// Prints TB_RESULT; a watchdog ends a hung run.
module tb_fetch;
  import cpu_pkg::*;
  import rv_asm::*;
  logic clk = 0, rst = 1;
  logic redirect, ic_v, ic_hit, hit_en, ras_push, ras_pop, ras_empty, iq_room, stalled;
  word_t redirect_pc, ic_pc, ras_addr, ras_top;
  logic [63:0] ic_line;
  word_t bp_pc [2], btb_pc [2], btb_tgt [2];
  logic bp_taken [2], btb_hit [2], out_v [2];
  fetch_pkt_t out [2];
  word_t imem [64];
  int checks = 0, failures = 0;

  fetch dut (.clk, .rst, .redirect_i(redirect), .redirect_pc_i(redirect_pc),
    .ic_v_o(ic_v), .ic_pc_o(ic_pc), .ic_hit_i(ic_hit), .ic_line_i(ic_line), .bp_pc_o(bp_pc),
    .bp_taken_i(bp_taken), .btb_pc_o(btb_pc), .btb_hit_i(btb_hit), .btb_tgt_i(btb_tgt),
    .ras_push_o(ras_push), .ras_addr_o(ras_addr), .ras_pop_o(ras_pop), .ras_top_i(ras_top),
    .ras_empty_i(ras_empty), .iq_room_i(iq_room), .out_v_o(out_v), .out_o(out), .stalled_o(stalled));
  assign ic_hit  = hit_en && ic_v;
  assign ic_line = {imem[{ic_pc[7:3], 1'b1}], imem[{ic_pc[7:3], 1'b0}]};
  always #5 clk = ~clk;
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  // check this cycle's group: valid bits, PCs and predicted next PCs of the valid slots
  task automatic group(string n, word_t pc, logic v0, logic v1, word_t p0, word_t p1);
    chk({n, " fetch pc"}, ic_pc, pc);
    chk({n, " v0"}, 32'(out_v[0]), 32'(v0));
    chk({n, " v1"}, 32'(out_v[1]), 32'(v1));
    if (v0) begin chk({n, " pc0"}, out[0].pc, {pc[31:3], 3'b000}); chk({n, " npc0"}, out[0].pred_npc, p0); end
    if (v1) begin chk({n, " pc1"}, out[1].pc, {pc[31:3], 3'b100}); chk({n, " npc1"}, out[1].pred_npc, p1); end
  endtask
  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    foreach (imem[i]) imem[i] = addi(1, 1, 1);
    imem[2]  = beq(1, 2, 32);          // 0x08 -> 0x28
    imem[10] = jal(1, 16);             // 0x28 -> 0x38, call
    imem[15] = jalr(0, 1, 0);          // 0x3C return
    imem[17] = jalr(1, 5, 0);          // 0x44 call through a register
    imem[32] = 32'h1050_0073;          // 0x80 wfi
    redirect = 0; redirect_pc = '0; hit_en = 1; iq_room = 1;
    bp_taken = '{0, 0}; btb_hit = '{0, 0}; btb_tgt = '{0, 0}; ras_empty = 1; ras_top = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    #1;
    group("sequential", 32'h0, 1, 1, 32'h4, 32'h8);
    chk("no stall", 32'(stalled), 0);
    step();
    bp_taken = '{1, 0}; #1;
    group("taken branch", 32'h8, 1, 0, 32'h28, 0);
    chk("branch predictor asked", bp_pc[0], 32'h8);
    step(); bp_taken = '{0, 0}; #1;
    group("jal", 32'h28, 1, 0, 32'h38, 0);
    chk("jal push", 32'(ras_push), 1);
    chk("jal return address", ras_addr, 32'h2C);
    step();
    ras_empty = 0; ras_top = 32'h44; #1;
    group("return", 32'h38, 1, 1, 32'h3C, 32'h44);
    chk("return pops", 32'(ras_pop), 1);
    step(); ras_empty = 1; #1;
    btb_hit = '{0, 1}; btb_tgt = '{0, 32'h80}; #1;
    group("upper slot call", 32'h44, 0, 1, 0, 32'h80);
    chk("call push", 32'(ras_push), 1);
    chk("call return address", ras_addr, 32'h48);
    step(); btb_hit = '{0, 0};
    hit_en = 0; #1;
    group("cache miss", 32'h80, 0, 0, 0, 0);
    chk("miss stalls", 32'(stalled), 1);
    step();
    chk("pc held on miss", ic_pc, 32'h80);
    hit_en = 1; iq_room = 0; #1;
    group("queue full", 32'h80, 0, 0, 0, 0);
    step();
    iq_room = 1; #1;
    group("wfi", 32'h80, 1, 0, 32'h84, 0);
    step();
    chk("halted: no cache read", 32'(ic_v), 0);
    chk("halted: no output", 32'(out_v[0] | out_v[1]), 0);
    step();
    chk("still halted", 32'(ic_v), 0);
    redirect = 1; redirect_pc = 32'h104; #1;
    chk("no output during redirect", 32'(out_v[0] | out_v[1]), 0);
    step(); redirect = 0; #1;
    group("after redirect", 32'h104, 0, 1, 0, 32'h108);
    step();
    group("next line", 32'h108, 1, 1, 32'h10C, 32'h110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
