// mem_model: behavioural main memory for simulation (not synthesizable).
// 64 KiB of 8-byte lines. One request per cycle: the memory answers with a non-zero
// tag (mem2proc_response) in the same cycle if it accepts, which it does while fewer
// than 15 loads are outstanding. A load's line is read when it is accepted and returned
// LATENCY cycles later together with its tag on mem2proc_tag / mem2proc_data (tag 0
// means no response). A store writes the line at once and returns nothing later.
// The 13-cycle default latency is the one the design was tuned for.
module mem_model
  import cpu_pkg::*;
#(
  parameter int LATENCY = 13
) (
  input  logic clk,
  input  logic rst,
  input  mem_cmd_t proc2mem_command,
  input  word_t    proc2mem_addr,
  input  logic [63:0] proc2mem_data,
  output logic [MEM_TAG_W-1:0] mem2proc_response,
  output logic [63:0] mem2proc_data,
  output logic [MEM_TAG_W-1:0] mem2proc_tag
);
  logic [63:0] mem [8192];
  logic [MEM_TAG_W-1:0] ptag [LATENCY];
  logic [63:0]          pdat [LATENCY];
  logic [MEM_TAG_W-1:0] next_tag;
  int outstanding;

  always_comb begin
    mem2proc_response = '0;
    if (proc2mem_command == MEM_CMD_STORE) mem2proc_response = next_tag;
    else if (proc2mem_command == MEM_CMD_LOAD && outstanding < 15) mem2proc_response = next_tag;
  end
  assign mem2proc_tag  = ptag[LATENCY-1];
  assign mem2proc_data = pdat[LATENCY-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LATENCY; i++) begin ptag[i] <= '0; pdat[i] <= '0; end
      next_tag <= 4'd1;
      outstanding <= 0;
    end else begin
      int o;
      o = outstanding - (ptag[LATENCY-1] != '0 ? 1 : 0);
      for (int i = 1; i < LATENCY; i++) begin ptag[i] <= ptag[i-1]; pdat[i] <= pdat[i-1]; end
      ptag[0] <= '0;
      if (mem2proc_response != '0) begin
        next_tag <= (next_tag == 4'd15) ? 4'd1 : next_tag + 4'd1;
        if (proc2mem_command == MEM_CMD_STORE) mem[proc2mem_addr[15:3]] <= proc2mem_data;
        else begin
          ptag[0] <= mem2proc_response;
          pdat[0] <= mem[proc2mem_addr[15:3]];
          o = o + 1;
        end
      end
      outstanding <= o;
    end
  end
endmodule
