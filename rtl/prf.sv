// prf: physical register file of one thread, NPR = 32 + ROB_SZ = 96 registers with a
// ready bit each. The two threads each have their own file so physical register numbers
// 0..95 are reused by both threads and a thread bit on every tag tells them apart.
// Reads are combinational (NRD ports). Results arrive from the result buses: a bus whose
// tag names this thread writes its value and sets the ready bit. Allocating a register at
// dispatch clears its ready bit. After reset registers 0..31 hold architectural x0..x31,
// all zero and ready; register 0 is x0 and is never written.
module prf
  import cpu_pkg::*;
#(
  parameter logic TID = 1'b0,
  parameter int   NRD = 8,
  parameter int   NAL = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  prn_t  rd_prn_i   [NRD],
  output word_t rd_val_o   [NRD],
  output logic  rd_rdy_o   [NRD],
  input  cdb_t  cdb_i      [CDB_W],
  input  logic  alloc_i    [NAL],
  input  prn_t  alloc_prn_i[NAL]
);
  word_t rf  [NPR];
  logic  rdy [NPR];

  always_comb
    for (int r = 0; r < NRD; r++) begin
      rd_val_o[r] = rf[rd_prn_i[r]];
      rd_rdy_o[r] = rdy[rd_prn_i[r]];
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPR; i++) begin
        rf[i]  <= '0;
        rdy[i] <= (i < 32);
      end
    end else begin
      for (int a = 0; a < NAL; a++)
        if (alloc_i[a] && alloc_prn_i[a] != '0) rdy[alloc_prn_i[a]] <= 1'b0;
      for (int c = 0; c < CDB_W; c++)
        if (cdb_i[c].valid && cdb_i[c].has_dest && cdb_i[c].tag.tid == TID &&
            cdb_i[c].tag.prn != '0) begin
          rf[cdb_i[c].tag.prn]  <= cdb_i[c].value;
          rdy[cdb_i[c].tag.prn] <= 1'b1;
        end
    end
  end
endmodule
