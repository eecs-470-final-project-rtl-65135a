// rat: register alias table (map table) of one thread: for each of the 32 architectural
// registers, the physical register that holds its newest value. NS instructions are
// renamed per cycle, in program order: a source of a later slot that names the
// destination of an earlier slot in the same cycle gets that slot's new register.
// On a misprediction the whole table is replaced by the retirement table (recover_i),
// so recovery happens when the mispredicted branch retires. x0 always maps to register 0.
module rat
  import cpu_pkg::*;
#(
  parameter int NS = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_i   [NS],
  input  logic [4:0] rs1_i     [NS],
  input  logic [4:0] rs2_i     [NS],
  input  logic [4:0] rd_i      [NS],
  input  logic       has_dest_i[NS],
  input  prn_t       new_prn_i [NS],
  output prn_t       rs1_prn_o [NS],
  output prn_t       rs2_prn_o [NS],
  input  logic       recover_i,
  input  prn_t       rrat_i    [32]
);
  prn_t map [32];

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      rs1_prn_o[s] = map[rs1_i[s]];
      rs2_prn_o[s] = map[rs2_i[s]];
      for (int p = 0; p < s; p++)
        if (valid_i[p] && has_dest_i[p]) begin
          if (rd_i[p] == rs1_i[s]) rs1_prn_o[s] = new_prn_i[p];
          if (rd_i[p] == rs2_i[s]) rs2_prn_o[s] = new_prn_i[p];
        end
      if (rs1_i[s] == 5'd0) rs1_prn_o[s] = '0;
      if (rs2_i[s] == 5'd0) rs2_prn_o[s] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) map[i] <= prn_t'(i);
    end else if (recover_i) begin
      map <= rrat_i;
    end else begin
      for (int s = 0; s < NS; s++)
        if (valid_i[s] && has_dest_i[s] && rd_i[s] != 5'd0) map[rd_i[s]] <= new_prn_i[s];
    end
  end
endmodule
