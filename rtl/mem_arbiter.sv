// mem_arbiter: shares the single memory port between the data cache and the instruction
// cache. Only one request can be made per cycle; data cache requests (line fetches and
// write-backs) go first, so loads and stores are not held up by instruction fetch, and
// the instruction cache uses the port in the cycles the data cache leaves free.
// The memory answers a request in the same cycle with a non-zero tag if it takes it;
// the matching ack tells the requester. Responses (tag and data) go to both caches,
// each of which recognises its own tags.
module mem_arbiter
  import cpu_pkg::*;
(
  input  logic     dc_req_i,
  input  mem_cmd_t dc_cmd_i,
  input  word_t    dc_addr_i,
  input  logic [63:0] dc_data_i,
  output logic     dc_ack_o,
  input  logic     ic_req_i,
  input  word_t    ic_addr_i,
  output logic     ic_ack_o,
  output mem_cmd_t mem_cmd_o,
  output word_t    mem_addr_o,
  output logic [63:0] mem_data_o,
  input  logic [MEM_TAG_W-1:0] mem_resp_i
);
  always_comb begin
    mem_cmd_o  = MEM_CMD_NONE;
    mem_addr_o = ic_addr_i;
    mem_data_o = dc_data_i;
    if (dc_req_i) begin
      mem_cmd_o  = dc_cmd_i;
      mem_addr_o = dc_addr_i;
    end else if (ic_req_i) begin
      mem_cmd_o  = MEM_CMD_LOAD;
    end
    dc_ack_o = dc_req_i && mem_resp_i != '0;
    ic_ack_o = !dc_req_i && ic_req_i && mem_resp_i != '0;
  end
endmodule
