// trie_cache: direct-mapped cache of trie nodes for the exact matcher.
//
// Sits between the exact-matching engine and the prefetch unit. A request
// (one-cycle pulse, one outstanding) that hits returns the cached node one
// cycle later without an external access. A miss is passed on downstream in
// the same cycle; the returned node is written into the cache and forwarded
// one cycle after it arrives. Under a sub-pattern attack only a few trie
// nodes are visited over and over, so a small cache removes most memory
// reads. With `en` low every request misses and nothing is filled.
// `flush` invalidates all lines (after the trie table is reloaded).
//
// The cache's presence and purpose follow the source design; its size
// (LINES = 64 nodes), organisation (direct mapped, one node per line,
// indexed by the low address bits) and timing are this design's own.
module trie_cache
  import vdp_pkg::*;
#(
  parameter int unsigned LINES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              flush,
  // upstream (exact-matching engine)
  input  logic              req,
  input  logic [MEM_AW-1:0] addr,
  output logic              resp_valid,
  output logic [MEM_DW-1:0] resp_data,
  // downstream (prefetch unit)
  output logic              d_req,
  output logic [MEM_AW-1:0] d_addr,
  input  logic              d_resp_valid,
  input  logic [MEM_DW-1:0] d_resp_data,
  // statistics
  output logic              ev_hit
);

  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = MEM_AW - IW;

  logic [LINES-1:0]  valid;
  logic [TW-1:0]     tags  [LINES];
  logic [MEM_DW-1:0] data  [LINES];
  logic [MEM_AW-1:0] miss_addr;
  logic              hit;
  logic [IW-1:0]     idx, fill_idx;

  always_comb begin
    idx      = addr[IW-1:0];
    fill_idx = miss_addr[IW-1:0];
    hit      = req && en && valid[idx] && (tags[idx] == addr[MEM_AW-1:IW]);
    d_req    = req && !hit;
    d_addr   = addr;
    ev_hit   = hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= '0;
      resp_valid <= 1'b0;
      miss_addr  <= '0;
    end else begin
      resp_valid <= hit || d_resp_valid;
      if (d_req) miss_addr <= addr;
      if (flush) valid <= '0;
      else if (d_resp_valid && en) valid[fill_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (hit) resp_data <= data[idx];
    else if (d_resp_valid) resp_data <= d_resp_data;
    if (d_resp_valid && en) begin
      tags[fill_idx] <= miss_addr[MEM_AW-1:IW];
      data[fill_idx] <= d_resp_data;
    end
  end

endmodule
