// freelist: free physical registers of one thread, kept as one bit per register.
// Up to NA registers are handed out per cycle, lowest numbers first (alloc_prn_o is
// valid when the corresponding alloc_ok_o is set; the caller only takes what it uses,
// through take_i). Registers come back when the instruction that replaced them retires
// (free_i). On a misprediction the list is rebuilt from the retirement table: every
// register the retirement table does not name is free. Register 0 (x0) is never free.
module freelist
  import cpu_pkg::*;
#(
  parameter int NA = 2,
  parameter int NF = 2
) (
  input  logic clk,
  input  logic rst,
  output prn_t alloc_prn_o [NA],
  output logic alloc_ok_o  [NA],
  input  logic take_i      [NA],
  input  logic free_i      [NF],
  input  prn_t free_prn_i  [NF],
  input  logic recover_i,
  input  prn_t rrat_i      [32],
  output logic [$clog2(NPR+1)-1:0] count_o
);
  logic [NPR-1:0] fr;

  always_comb begin
    logic [NPR-1:0] m;
    m = fr;
    count_o = '0;
    for (int i = 0; i < NPR; i++) count_o = count_o + fr[i];
    for (int a = 0; a < NA; a++) begin
      alloc_ok_o[a]  = 1'b0;
      alloc_prn_o[a] = '0;
      for (int i = NPR-1; i >= 0; i--)
        if (m[i]) begin
          alloc_ok_o[a]  = 1'b1;
          alloc_prn_o[a] = prn_t'(i);
        end
      if (alloc_ok_o[a]) m[alloc_prn_o[a]] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPR; i++) fr[i] <= (i >= 32);
    end else if (recover_i) begin
      logic [NPR-1:0] used;
      used = '0;
      for (int r = 0; r < 32; r++) used[rrat_i[r]] = 1'b1;
      fr <= ~used;
      fr[0] <= 1'b0;
    end else begin
      for (int a = 0; a < NA; a++)
        if (take_i[a] && alloc_ok_o[a]) fr[alloc_prn_o[a]] <= 1'b0;
      for (int f = 0; f < NF; f++)
        if (free_i[f] && free_prn_i[f] != '0) fr[free_prn_i[f]] <= 1'b1;
    end
  end
endmodule
