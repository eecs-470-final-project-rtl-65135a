// inst_queue: instruction queue of one thread, a FIFO of DEPTH (16) fetched
// instructions between fetch and decode. Up to two instructions enter and up to two
// leave per cycle; the two oldest are always visible at the head. room_o tells fetch
// whether two more fit. flush_i empties it (misprediction recovery).
module inst_queue
  import cpu_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic flush_i,
  input  logic push_i [2],
  input  fetch_pkt_t push_pkt_i [2],
  output logic room_o,
  output logic head_v_o [2],
  output fetch_pkt_t head_o [2],
  input  logic [1:0] pop_i           // how many leave (0..2)
);
  localparam int P_W = $clog2(DEPTH);
  fetch_pkt_t q [DEPTH];
  logic [P_W-1:0] hd, tl;
  logic [P_W:0]   cnt;

  assign room_o = cnt <= (P_W+1)'(DEPTH - 2);
  always_comb
    for (int k = 0; k < 2; k++) begin
      head_v_o[k] = cnt > (P_W+1)'(k);
      head_o[k]   = q[hd + P_W'(k)];
    end

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      hd <= '0; tl <= '0; cnt <= '0;
    end else begin
      logic [P_W-1:0] t;
      logic [P_W:0] c;
      t = tl;
      c = cnt - (P_W+1)'(pop_i);
      for (int k = 0; k < 2; k++)
        if (push_i[k]) begin
          q[t] <= push_pkt_i[k];
          t = t + 1'b1;
          c = c + 1'b1;
        end
      tl  <= t;
      hd  <= hd + P_W'(pop_i);
      cnt <= c;
    end
  end
endmodule
