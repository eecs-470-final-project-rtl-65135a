// icache: instruction cache shared by the two fetch units.
//   * 256 bytes, direct mapped: LINES (32) lines of 8 bytes (two instructions).
//   * a fully associative victim cache of VLINES (4) lines (32 bytes) that receives
//     every line the main cache displaces, replaced first-in first-out.
//   * per thread a prefetcher that tracks up to PF_LINES (4) outstanding lines
//     (8 instructions, the thread's prefetch buffer).
// Both threads look up in the same cycle (combinational hit and line). On a miss the
// thread requests the missing line and starts prefetching the following lines; it keeps
// prefetching while it has fewer than PF_LINES lines in flight, the prefetch address is
// at most PF_LINES lines ahead of the fetch address, and the prefetch address does not
// map to the cache line that fetch is using. Lines already present are skipped. One
// memory request is made per cycle; when both threads want one, a demand miss goes
// before a prefetch and otherwise the threads alternate every cycle. Returning lines
// are written into the main cache and the line they replace moves to the victim cache.
// The organisation follows the design description; the window rule and the FIFO
// replacement of the victim cache are this design's choices.
module icache
  import cpu_pkg::*;
#(
  parameter int LINES    = 32,
  parameter int VLINES   = 4,
  parameter int PF_LINES = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic  rd_v_i   [NT],
  input  word_t rd_pc_i  [NT],
  output logic  hit_o    [NT],
  output logic [63:0] line_o [NT],
  // memory (load requests only)
  output logic  mem_req_o,
  output word_t mem_addr_o,
  input  logic  mem_ack_i,
  input  logic [MEM_TAG_W-1:0] mem_tag_i,
  input  logic [MEM_TAG_W-1:0] mem_rtag_i,
  input  logic [63:0] mem_rdata_i,
  output logic  pf_issue_o           // a prefetch request was accepted this cycle
);
  localparam int LI_W  = $clog2(LINES);
  localparam int NP    = NT * PF_LINES;
  localparam int VI_W  = $clog2(VLINES);

  typedef logic [28:0] laddr_t;

  logic              cv   [LINES];
  logic [28-LI_W:0]  ctag [LINES];
  logic [63:0]       cdat [LINES];
  logic              vv   [VLINES];
  laddr_t            va   [VLINES];
  logic [63:0]       vdat [VLINES];
  logic [VI_W-1:0]   vptr;
  logic              pv   [NP];
  logic              ptid [NP];
  laddr_t            pa   [NP];
  logic [MEM_TAG_W-1:0] pt [NP];
  laddr_t            pf_next [NT];
  logic              pf_on   [NT];
  logic              turn;

  function automatic logic present(input laddr_t a, input logic cvv [LINES],
                                   input logic [28-LI_W:0] ct [LINES],
                                   input logic vvv [VLINES], input laddr_t vaa [VLINES]);
    logic p;
    p = cvv[a[LI_W-1:0]] && ct[a[LI_W-1:0]] == a[28:LI_W];
    for (int v = 0; v < VLINES; v++) if (vvv[v] && vaa[v] == a) p = 1'b1;
    return p;
  endfunction

  logic   want   [NT];
  logic   demand [NT];
  laddr_t want_a [NT];
  logic   skip   [NT];     // prefetch address already present: move on
  int     nout   [NT];
  logic   pend_l [NT];

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      laddr_t fl;
      logic pend_pf;
      fl = rd_pc_i[t][31:3];
      hit_o[t]  = 1'b0;
      line_o[t] = cdat[fl[LI_W-1:0]];
      if (cv[fl[LI_W-1:0]] && ctag[fl[LI_W-1:0]] == fl[28:LI_W]) hit_o[t] = 1'b1;
      for (int v = 0; v < VLINES; v++)
        if (vv[v] && va[v] == fl && !hit_o[t]) begin hit_o[t] = 1'b1; line_o[t] = vdat[v]; end
      if (!rd_v_i[t]) hit_o[t] = 1'b0;
      nout[t] = 0; pend_l[t] = 1'b0; pend_pf = 1'b0;
      for (int p = 0; p < NP; p++) begin
        if (pv[p] && ptid[p] == 1'(t)) nout[t] = nout[t] + 1;
        if (pv[p] && pa[p] == fl) pend_l[t] = 1'b1;
        if (pv[p] && pa[p] == pf_next[t]) pend_pf = 1'b1;
      end
      demand[t] = rd_v_i[t] && !hit_o[t] && !pend_l[t];
      skip[t] = 1'b0;
      want[t] = 1'b0;
      want_a[t] = fl;
      if (nout[t] < PF_LINES) begin
        if (demand[t]) begin
          want[t] = 1'b1;
        end else if (pf_on[t] && rd_v_i[t] && (pf_next[t] - fl) <= laddr_t'(PF_LINES) &&
                     pf_next[t] != fl && pf_next[t][LI_W-1:0] != fl[LI_W-1:0]) begin
          if (present(pf_next[t], cv, ctag, vv, va) || pend_pf) skip[t] = 1'b1;
          else begin want[t] = 1'b1; want_a[t] = pf_next[t]; end
        end
      end
    end
  end

  logic win;
  always_comb begin
    if (want[0] && want[1]) begin
      if (demand[0] != demand[1]) win = demand[1];
      else win = turn;
    end else win = want[1];
    mem_req_o  = want[win];
    mem_addr_o = {want_a[win], 3'b0};
    pf_issue_o = mem_req_o && mem_ack_i && !demand[win];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINES; i++) cv[i] <= 1'b0;
      for (int v = 0; v < VLINES; v++) vv[v] <= 1'b0;
      for (int p = 0; p < NP; p++) pv[p] <= 1'b0;
      for (int t = 0; t < NT; t++) begin pf_on[t] <= 1'b0; pf_next[t] <= '0; end
      vptr <= '0;
      turn <= 1'b0;
    end else begin
      turn <= ~turn;
      for (int t = 0; t < NT; t++) if (skip[t]) pf_next[t] <= pf_next[t] + 1'b1;
      // fill
      for (int p = 0; p < NP; p++)
        if (pv[p] && pt[p] == mem_rtag_i && mem_rtag_i != '0) begin
          logic [LI_W-1:0] i;
          i = pa[p][LI_W-1:0];
          pv[p] <= 1'b0;
          if (cv[i] && ctag[i] != pa[p][28:LI_W]) begin
            vv[vptr] <= 1'b1;
            va[vptr] <= {ctag[i], i};
            vdat[vptr] <= cdat[i];
            vptr <= vptr + 1'b1;
          end
          for (int v = 0; v < VLINES; v++) if (vv[v] && va[v] == pa[p]) vv[v] <= 1'b0;
          cv[i] <= 1'b1;
          ctag[i] <= pa[p][28:LI_W];
          cdat[i] <= mem_rdata_i;
        end
      // request accepted
      if (mem_req_o && mem_ack_i) begin
        int slot;
        slot = -1;
        for (int p = NP-1; p >= 0; p--) if (!pv[p]) slot = p;
        if (slot >= 0) begin
          pv[slot] <= 1'b1; ptid[slot] <= win; pa[slot] <= want_a[win]; pt[slot] <= mem_tag_i;
        end
        if (demand[win]) begin
          pf_on[win] <= 1'b1;
          pf_next[win] <= want_a[win] + 1'b1;
        end else pf_next[win] <= pf_next[win] + 1'b1;
      end
    end
  end
endmodule
