// trie_prefetch: next-node prefetch between the trie cache and memory.
//
// The trie table is laid out so that the nodes of one pattern occupy
// consecutive memory words. After every node delivered for address A the
// unit, when enabled, reads A+1 in the background into a one-node prefetch
// buffer while the engine compares. The next request that asks for the
// prefetched address is answered from the buffer (or as soon as the
// prefetch read returns) instead of starting a new external access, so the
// memory latency overlaps with computing, and consecutive reads benefit from
// the memory's shorter burst latency.
//
// Upstream: one-cycle req pulse, one request outstanding, resp_valid one
// cycle after the data is known. Downstream: a load/store-interface client
// (req held until gnt, rvalid pulse with the data). A request that misses
// the buffer while a prefetch read is in flight waits for it, then reads.
//
// Prefetching neighbouring trie nodes follows the source design; the depth
// of one node, the "next address" policy and the handshakes are this
// design's own.
// rst_n is both the asynchronous reset and the disable condition of the
// assertion at the end; a linter may report it as used synchronously and
// asynchronously, which is intended.
module trie_prefetch
  import vdp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              flush,
  // upstream (trie cache)
  input  logic              req,
  input  logic [MEM_AW-1:0] addr,
  output logic              resp_valid,
  output logic [MEM_DW-1:0] resp_data,
  // downstream (load/store interface client)
  output logic              d_req,
  output logic [MEM_AW-1:0] d_addr,
  input  logic              d_gnt,
  input  logic              d_rvalid,
  input  logic [MEM_DW-1:0] d_rdata,
  // statistics
  output logic              ev_demand_read,
  output logic              ev_prefetch_read,
  output logic              ev_pf_hit
);

  typedef enum logic [1:0] {M_IDLE, M_WAIT_PF, M_DREQ, M_DWAIT} mstate_e;
  typedef enum logic [1:0] {P_IDLE, P_REQ, P_WAIT} pstate_e;

  mstate_e           mst;
  pstate_e           pst;
  logic [MEM_AW-1:0] cur_addr;
  logic [MEM_AW-1:0] pf_addr;
  logic [MEM_DW-1:0] pf_data;
  logic              pf_valid;
  logic              pf_done;      // prefetch read returns this cycle
  logic              buf_hit;      // request served from the buffer now
  logic              wait_hit;     // waited request served by returning prefetch
  logic              wait_buf;     // waited request found in the buffer
  logic              wait_miss;    // waited request needs its own read

  always_comb begin
    pf_done   = (pst == P_WAIT) && d_rvalid;
    buf_hit   = (mst == M_IDLE) && req && en && pf_valid && (pf_addr == addr);
    wait_hit  = (mst == M_WAIT_PF) && pf_done && (pf_addr == cur_addr);
    wait_buf  = (mst == M_WAIT_PF) && (pst == P_IDLE) && en && pf_valid && (pf_addr == cur_addr);
    wait_miss = (mst == M_WAIT_PF) && (pst == P_IDLE) && !wait_buf;
    d_req     = (mst == M_DREQ) || (pst == P_REQ);
    d_addr    = (mst == M_DREQ) ? cur_addr : pf_addr;
    ev_demand_read   = (mst == M_DREQ) && d_gnt;
    ev_prefetch_read = (mst != M_DREQ) && (pst == P_REQ) && d_gnt;
    ev_pf_hit        = buf_hit || wait_hit || wait_buf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst        <= M_IDLE;
      pst        <= P_IDLE;
      pf_valid   <= 1'b0;
      pf_addr    <= '0;
      cur_addr   <= '0;
      resp_valid <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      // prefetch side
      if (pst == P_REQ && mst != M_DREQ && d_gnt) pst <= P_WAIT;
      if (pf_done) begin
        pst      <= P_IDLE;
        pf_valid <= 1'b1;
      end
      // demand side
      unique case (mst)
        M_IDLE: if (req) begin
          cur_addr <= addr;
          if (buf_hit) begin
            resp_valid <= 1'b1;
            pst        <= P_REQ;               // stream on: fetch addr+1
            pf_addr    <= addr + MEM_AW'(1);
            pf_valid   <= 1'b0;
          end else if (pst != P_IDLE) begin
            mst <= M_WAIT_PF;
          end else begin
            mst <= M_DREQ;
          end
        end
        M_WAIT_PF: begin
          if (wait_hit || wait_buf) begin
            resp_valid <= 1'b1;
            mst        <= M_IDLE;
            pst        <= P_REQ;
            pf_addr    <= cur_addr + MEM_AW'(1);
            pf_valid   <= 1'b0;
          end else if (wait_miss) begin
            mst <= M_DREQ;
          end
        end
        M_DREQ: if (d_gnt) mst <= M_DWAIT;
        M_DWAIT: if (d_rvalid) begin
          resp_valid <= 1'b1;
          mst        <= M_IDLE;
          if (en) begin
            pst      <= P_REQ;
            pf_addr  <= cur_addr + MEM_AW'(1);
            pf_valid <= 1'b0;
          end
        end
      endcase
      if (flush) pf_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (pf_done) pf_data <= d_rdata;
    if (buf_hit || wait_buf) resp_data <= pf_data;
    else if (wait_hit) resp_data <= d_rdata;
    else if (mst == M_DWAIT && d_rvalid) resp_data <= d_rdata;
  end

  // Only one downstream read may be outstanding.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    !((mst == M_DWAIT) && (pst == P_WAIT)));

endmodule
