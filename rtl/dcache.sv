// dcache: non-blocking, write-back, write-allocate data cache of 256 bytes: SETS (8) sets
// of WAYS (4) ways of 8-byte lines, with tree pseudo-LRU bits per set and NMSHR (4) miss
// status holding registers.
// Load port: a hit returns the line in the same cycle. A miss looks in the MSHRs: if one
// is already fetching the line the load simply waits for it, otherwise a free MSHR is
// allocated; either way the miss is accepted (ld_acc_o) and the cache keeps serving
// other requests. Store port (committed stores from the store queues): a hit writes the
// bytes and marks the line dirty; a miss is accepted the same way and its bytes are
// merged into the MSHR. When a line comes back from memory the pending store bytes are
// applied, the line is written into the pseudo-LRU way (a dirty victim goes to a
// write-back queue), and the merged line is broadcast (fill_*) to every waiting load.
// Requests that touch a line in the cycle it is being filled are refused and retried.
// Memory requests: queued write-backs first, then MSHR fetches (only when no write-back
// is queued, so a fetch never overtakes the write-back of the same line).
// The geometry, write policy, MSHRs and pseudo-LRU follow the design description; the
// number of MSHRs and the write-back queue are this design's choices.
module dcache
  import cpu_pkg::*;
#(
  parameter int SETS  = 8,
  parameter int WAYS  = 4,
  parameter int NMSHR = 4
) (
  input  logic clk,
  input  logic rst,
  // loads
  input  logic  ld_req_i,
  input  word_t ld_addr_i,
  output logic  ld_hit_o,
  output logic  ld_acc_o,
  output logic [63:0] ld_line_o,
  // stores (aligned word with byte enables)
  input  logic  st_req_i,
  input  word_t st_addr_i,
  input  word_t st_word_i,
  input  logic [3:0] st_be_i,
  output logic  st_ack_o,
  // fill broadcast
  output logic  fill_v_o,
  output word_t fill_addr_o,
  output logic [63:0] fill_line_o,
  // memory
  output logic  mem_req_o,
  output mem_cmd_t mem_cmd_o,
  output word_t mem_addr_o,
  output logic [63:0] mem_data_o,
  input  logic  mem_ack_i,
  input  logic [MEM_TAG_W-1:0] mem_tag_i,
  input  logic [MEM_TAG_W-1:0] mem_rtag_i,
  input  logic [63:0] mem_rdata_i
);
  localparam int SI_W  = $clog2(SETS);
  localparam int TAG_W = XLEN - 3 - SI_W;
  localparam int WQ    = NMSHR;

  typedef struct packed {
    logic valid, dirty;
    logic [TAG_W-1:0] tag;
    logic [63:0] data;
  } line_t;

  typedef struct packed {
    logic valid, sent;
    logic [MEM_TAG_W-1:0] mtag;
    logic [28:0] laddr;       // line address (addr[31:3])
    logic [63:0] sdata;
    logic [7:0]  smask;
  } mshr_t;

  line_t lines [SETS][WAYS];
  logic [WAYS-2:0] plru [SETS];
  mshr_t mshr [NMSHR];
  logic [28:0] wq_addr [WQ];
  logic [63:0] wq_data [WQ];
  logic [$clog2(WQ+1)-1:0] wq_cnt;

  // tree pseudo-LRU for 4 ways: bit0 chooses the half, bit1/bit2 the way in each half;
  // each bit points at the side to replace next.
  function automatic logic [1:0] victim(input logic [WAYS-2:0] p);
    return p[0] ? {1'b1, p[2]} : {1'b0, p[1]};
  endfunction
  function automatic logic [WAYS-2:0] touch(input logic [WAYS-2:0] p, input logic [1:0] w);
    logic [WAYS-2:0] n;
    n = p;
    n[0] = ~w[1];
    if (w[1]) n[2] = ~w[0]; else n[1] = ~w[0];
    return n;
  endfunction

  function automatic logic [SI_W-1:0] sidx(input word_t a);
    return a[SI_W+2:3];
  endfunction

  // fill detection
  logic fill_v;
  logic [$clog2(NMSHR)-1:0] fill_m;
  always_comb begin
    fill_v = 1'b0; fill_m = '0;
    for (int m = 0; m < NMSHR; m++)
      if (mshr[m].valid && mshr[m].sent && mshr[m].mtag == mem_rtag_i && mem_rtag_i != '0) begin
        fill_v = 1'b1; fill_m = m[$clog2(NMSHR)-1:0];
      end
  end
  logic [63:0] merged;
  always_comb begin
    for (int b = 0; b < 8; b++)
      merged[8*b +: 8] = mshr[fill_m].smask[b] ? mshr[fill_m].sdata[8*b +: 8] : mem_rdata_i[8*b +: 8];
  end
  assign fill_v_o    = fill_v;
  assign fill_addr_o = {mshr[fill_m].laddr, 3'b0};
  assign fill_line_o = merged;

  // lookups
  logic ld_hit, st_hit, ld_mhit, st_mhit, ld_busy, st_busy;
  logic [1:0] ld_way, st_way;
  logic [$clog2(NMSHR)-1:0] st_m, free_m, free_m2;
  logic free_v, free_v2;
  always_comb begin
    ld_hit = 1'b0; st_hit = 1'b0; ld_way = '0; st_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      line_t l, s;
      l = lines[sidx(ld_addr_i)][w];
      s = lines[sidx(st_addr_i)][w];
      if (l.valid && l.tag == ld_addr_i[XLEN-1:SI_W+3]) begin ld_hit = 1'b1; ld_way = 2'(w); end
      if (s.valid && s.tag == st_addr_i[XLEN-1:SI_W+3]) begin st_hit = 1'b1; st_way = 2'(w); end
    end
    ld_mhit = 1'b0; st_mhit = 1'b0; st_m = '0;
    free_v = 1'b0; free_m = '0; free_v2 = 1'b0; free_m2 = '0;
    for (int m = NMSHR-1; m >= 0; m--) begin
      if (mshr[m].valid && mshr[m].laddr == ld_addr_i[31:3]) ld_mhit = 1'b1;
      if (mshr[m].valid && mshr[m].laddr == st_addr_i[31:3]) begin st_mhit = 1'b1; st_m = 2'(m); end
    end
    for (int m = NMSHR-1; m >= 0; m--)
      if (!mshr[m].valid) begin free_v2 = free_v; free_m2 = free_m; free_v = 1'b1; free_m = 2'(m); end
    ld_busy = fill_v && ld_addr_i[31:3] == mshr[fill_m].laddr;
    // a store is also refused while its set takes a fill, which may evict its line
    st_busy = fill_v && sidx(st_addr_i) == mshr[fill_m].laddr[SI_W-1:0];
  end

  // a load and a store missing on the same new line share one MSHR
  logic ld_alloc, st_alloc, same_line;
  always_comb begin
    same_line = ld_addr_i[31:3] == st_addr_i[31:3];
    ld_hit_o  = ld_req_i && ld_hit && !ld_busy;
    ld_line_o = lines[sidx(ld_addr_i)][ld_way].data;
    ld_alloc  = ld_req_i && !ld_hit && !ld_mhit && !ld_busy && free_v;
    ld_acc_o  = ld_req_i && !ld_hit && !ld_busy && (ld_mhit || free_v);
    st_alloc  = st_req_i && !st_hit && !st_mhit && !st_busy &&
                !(ld_alloc && same_line) && (ld_alloc ? free_v2 : free_v);
    st_ack_o  = st_req_i && !st_busy &&
                (st_hit || st_mhit || (ld_alloc && same_line) || st_alloc);
  end

  // memory requests
  logic send_m_v;
  logic [$clog2(NMSHR)-1:0] send_m;
  always_comb begin
    send_m_v = 1'b0; send_m = '0;
    for (int m = NMSHR-1; m >= 0; m--)
      if (mshr[m].valid && !mshr[m].sent) begin send_m_v = 1'b1; send_m = 2'(m); end
    mem_req_o  = (wq_cnt != 0) || send_m_v;
    mem_cmd_o  = (wq_cnt != 0) ? MEM_CMD_STORE : MEM_CMD_LOAD;
    mem_addr_o = (wq_cnt != 0) ? {wq_addr[0], 3'b0} : {mshr[send_m].laddr, 3'b0};
    mem_data_o = wq_data[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SETS; s++) begin
        plru[s] <= '0;
        for (int w = 0; w < WAYS; w++) lines[s][w] <= '0;
      end
      for (int m = 0; m < NMSHR; m++) mshr[m] <= '0;
      wq_cnt <= '0;
    end else begin
      logic [$clog2(WQ+1)-1:0] wc;
      wc = wq_cnt;
      // write-back queue / MSHR request
      if (mem_req_o && mem_ack_i) begin
        if (wq_cnt != 0) begin
          for (int q = 0; q < WQ-1; q++) begin
            wq_addr[q] <= wq_addr[q+1];
            wq_data[q] <= wq_data[q+1];
          end
          wc = wc - 1'b1;
        end else begin
          mshr[send_m].sent <= 1'b1;
          mshr[send_m].mtag <= mem_tag_i;
        end
      end
      // load hit
      if (ld_hit_o) plru[sidx(ld_addr_i)] <= touch(plru[sidx(ld_addr_i)], ld_way);
      // store hit
      if (st_req_i && st_hit && !st_busy) begin
        for (int b = 0; b < 4; b++)
          if (st_be_i[b])
            lines[sidx(st_addr_i)][st_way].data[32*st_addr_i[2] + 8*b +: 8] <= st_word_i[8*b +: 8];
        lines[sidx(st_addr_i)][st_way].dirty <= 1'b1;
        plru[sidx(st_addr_i)] <= touch(plru[sidx(st_addr_i)], st_way);
      end
      // allocations
      if (ld_alloc) begin
        mshr[free_m] <= '{valid: 1'b1, sent: 1'b0, mtag: '0, laddr: ld_addr_i[31:3],
                          sdata: '0, smask: '0};
      end
      if (st_alloc) begin
        mshr_t n;
        n = '{valid: 1'b1, sent: 1'b0, mtag: '0, laddr: st_addr_i[31:3], sdata: '0, smask: '0};
        for (int b = 0; b < 4; b++)
          if (st_be_i[b]) begin
            n.sdata[32*st_addr_i[2] + 8*b +: 8] = st_word_i[8*b +: 8];
            n.smask[4*st_addr_i[2] + b] = 1'b1;
          end
        mshr[ld_alloc ? free_m2 : free_m] <= n;
      end
      // store merging into an existing MSHR (or the one the load allocates now)
      if (st_ack_o && !st_hit && !st_alloc) begin
        logic [$clog2(NMSHR)-1:0] m;
        m = st_mhit ? st_m : free_m;
        for (int b = 0; b < 4; b++)
          if (st_be_i[b]) begin
            mshr[m].sdata[32*st_addr_i[2] + 8*b +: 8] <= st_word_i[8*b +: 8];
            mshr[m].smask[4*st_addr_i[2] + b] <= 1'b1;
          end
      end
      // fill
      if (fill_v) begin
        logic [SI_W-1:0] s;
        logic [1:0] v;
        s = mshr[fill_m].laddr[SI_W-1:0];
        v = victim(plru[s]);
        for (int w = WAYS-1; w >= 0; w--) if (!lines[s][w].valid) v = 2'(w);
        if (lines[s][v].valid && lines[s][v].dirty) begin
          wq_addr[wc[$clog2(WQ)-1:0]] <= {lines[s][v].tag, s};
          wq_data[wc[$clog2(WQ)-1:0]] <= lines[s][v].data;
          wc = wc + 1'b1;
        end
        lines[s][v] <= '{valid: 1'b1, dirty: |mshr[fill_m].smask,
                         tag: mshr[fill_m].laddr[28:SI_W], data: merged};
        plru[s] <= touch(plru[s], v);
        mshr[fill_m].valid <= 1'b0;
      end
      wq_cnt <= wc;
    end
  end
endmodule
