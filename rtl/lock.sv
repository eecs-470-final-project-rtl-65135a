// lock: reservation set for lr.w / sc.w, one entry per thread.
// An lr.w reserves its word address for its thread. An sc.w may write only if its thread
// still holds a reservation for the same address; each thread has its own combinational
// check (chk_ok_o), and a thread's executed sc.w (successful or not, done_i) ends its
// reservation. Any store written to the data cache by one thread cancels the other
// thread's reservation of the same word. This follows the design description of the
// locks; ending the reservation after an sc.w is this design's choice. A pipeline flush of
// the thread (flush_i) also ends it, because an lr.w on a squashed wrong path may have set it;
// the sc.w that follows then fails and the program retries.
module lock
  import cpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  lr_i       [NT],   // the thread's lr.w reads the cache
  input  word_t lr_addr_i  [NT],
  input  word_t chk_addr_i [NT],
  output logic  chk_ok_o   [NT],
  input  logic  done_i     [NT],   // the thread's sc.w executed
  input  logic  flush_i    [NT],   // the thread's pipeline is flushed
  input  logic  st_i,              // a store is written to the cache
  input  logic  st_tid_i,
  input  word_t st_addr_i
);
  logic         rv [NT];
  logic [29:0]  ra [NT];

  always_comb
    for (int t = 0; t < NT; t++) chk_ok_o[t] = rv[t] && ra[t] == chk_addr_i[t][31:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NT; t++) begin rv[t] <= 1'b0; ra[t] <= '0; end
    end else begin
      for (int t = 0; t < NT; t++) begin
        logic hit_now;
        // a store by the other thread landing in the same cycle wins over a new lr.w
        hit_now = st_i && 1'(t) != st_tid_i;
        if (flush_i[t]) rv[t] <= 1'b0;
        else if (lr_i[t]) begin
          rv[t] <= !(hit_now && st_addr_i[31:2] == lr_addr_i[t][31:2]);
          ra[t] <= lr_addr_i[t][31:2];
        end else begin
          if (hit_now && ra[t] == st_addr_i[31:2]) rv[t] <= 1'b0;
          if (done_i[t]) rv[t] <= 1'b0;
        end
      end
    end
  end
endmodule
