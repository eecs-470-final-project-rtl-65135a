// rrat: retirement register alias table of one thread: the architectural-to-physical
// mapping of retired instructions only. NR instructions retire per cycle in order; each
// retiring destination reports the register it replaces (old_prn_o), which the free list
// takes back. map_next_o is the table including this cycle's retirements; the map table
// and the free list are rebuilt from it when a misprediction retires.
module rrat
  import cpu_pkg::*;
#(
  parameter int NR = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_i [NR],
  input  logic [4:0] rd_i    [NR],
  input  prn_t       prn_i   [NR],
  output prn_t       old_prn_o [NR],
  output prn_t       map_next_o [32]
);
  prn_t map [32];

  always_comb begin
    map_next_o = map;
    for (int r = 0; r < NR; r++) begin
      old_prn_o[r] = map_next_o[rd_i[r]];
      if (valid_i[r] && rd_i[r] != 5'd0) map_next_o[rd_i[r]] = prn_i[r];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < 32; i++) map[i] <= prn_t'(i);
    else map <= map_next_o;
  end
endmodule
