// cdb: the common data bus. CDB_W result buses carry completed results to the physical
// register files, the reservation station, the store queue and the reorder buffers.
// The two ALUs own buses 0 and 1 so their results are never delayed: the reservation
// station wakes their consumers a cycle early (early tag broadcast), which is only safe
// if the result is certain to be on the bus in the next cycle. The remaining producers
// (multiplier, load buffer, store-conditional result) share the last bus with a rotating
// priority; a producer that is not granted keeps its result and asks again.
// The lane count and the arbitration are this design's choices.
module cdb
  import cpu_pkg::*;
#(
  parameter int NSH = 4        // producers that share the last bus
) (
  input  logic clk,
  input  logic rst,
  input  cdb_t alu_i [2],
  input  cdb_t sh_i  [NSH],
  output logic sh_grant_o [NSH],
  output cdb_t bus_o [CDB_W]
);
  logic [$clog2(NSH)-1:0] prio_q;
  logic [$clog2(NSH)-1:0] win;
  logic any;

  always_comb begin
    any = 1'b0;
    win = '0;
    for (int k = 0; k < NSH; k++) begin
      logic [$clog2(NSH):0] idx;
      idx = {1'b0, prio_q} + ($clog2(NSH)+1)'(k);
      if (idx >= ($clog2(NSH)+1)'(NSH)) idx = idx - ($clog2(NSH)+1)'(NSH);
      if (!any && sh_i[idx[$clog2(NSH)-1:0]].valid) begin
        any = 1'b1;
        win = idx[$clog2(NSH)-1:0];
      end
    end
    for (int k = 0; k < NSH; k++) sh_grant_o[k] = any && (win == k[$clog2(NSH)-1:0]);
    bus_o[0] = alu_i[0];
    bus_o[1] = alu_i[1];
    bus_o[2] = any ? sh_i[win] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) prio_q <= '0;
    else if (any) prio_q <= (win == ($clog2(NSH))'(NSH-1)) ? '0 : win + 1'b1;
  end
endmodule
