// tb_mem_arbiter: self-checking test of the memory port arbiter.
// Drives every combination of data-cache and instruction-cache requests and memory
// acceptance and checks that the data cache wins, that the instruction cache gets the
// port only when the data cache is idle, and that acks follow the memory tag.
// Prints TB_RESULT.
module tb_mem_arbiter;
  import cpu_pkg::*;
  logic dr, ir, da, ia;
  mem_cmd_t dc, mc;
  word_t dad, iad, mad;
  logic [63:0] dd, md;
  logic [MEM_TAG_W-1:0] resp;
  int checks = 0, failures = 0;
  mem_arbiter dut (.dc_req_i(dr), .dc_cmd_i(dc), .dc_addr_i(dad), .dc_data_i(dd), .dc_ack_o(da),
                   .ic_req_i(ir), .ic_addr_i(iad), .ic_ack_o(ia), .mem_cmd_o(mc), .mem_addr_o(mad),
                   .mem_data_o(md), .mem_resp_i(resp));
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  task automatic chk(string n, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: got %h expected %h", n, g, e); end
  endtask
  initial begin
    dad = 32'h100; iad = 32'h200; dd = 64'h55;
    for (int i = 0; i < 16; i++) begin
      dr = i[0]; ir = i[1]; dc = i[2] ? MEM_CMD_STORE : MEM_CMD_LOAD; resp = i[3] ? 4'd3 : 4'd0;
      #1;
      if (dr) begin
        chk("dc command", 32'(mc), 32'(dc)); chk("dc address", mad, 32'h100);
        if (dc == MEM_CMD_STORE) chk("dc data", md[31:0], 32'h55);
      end else if (ir) begin
        chk("ic command", 32'(mc), 32'(MEM_CMD_LOAD)); chk("ic address", mad, 32'h200);
      end else chk("idle", 32'(mc), 32'(MEM_CMD_NONE));
      chk("dc ack", 32'(da), 32'(dr && resp != 0));
      chk("ic ack", 32'(ia), 32'(!dr && ir && resp != 0));
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
