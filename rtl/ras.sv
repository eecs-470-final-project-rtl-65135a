// ras: return address stack of one thread. A call (jal or jalr that writes a register)
// pushes its return address, a return (jalr whose destination is x0) pops and uses the
// top entry as the predicted next PC. The stack is a circular buffer: a push onto a full
// stack overwrites the oldest entry. It is not repaired after a misprediction, so
// squashed calls and returns can leave it out of step, as the design description notes.
// The depth (8) is this design's choice. push and pop in one cycle replace the top.
module ras
  import cpu_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push_i,
  input  word_t push_addr_i,
  input  logic  pop_i,
  output word_t top_o,
  output logic  empty_o
);
  localparam int P_W = $clog2(DEPTH);
  word_t          stk [DEPTH];
  logic [P_W-1:0] ptr;          // index of the top entry
  logic [P_W:0]   cnt;

  assign top_o   = stk[ptr];
  assign empty_o = (cnt == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (push_i && pop_i) begin
      stk[ptr] <= push_addr_i;
    end else if (push_i) begin
      stk[ptr + 1'b1] <= push_addr_i;
      ptr <= ptr + 1'b1;
      if (cnt != (P_W+1)'(DEPTH)) cnt <= cnt + 1'b1;
    end else if (pop_i && cnt != 0) begin
      ptr <= ptr - 1'b1;
      cnt <= cnt - 1'b1;
    end
  end
endmodule
