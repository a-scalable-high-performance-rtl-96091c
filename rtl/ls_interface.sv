// ls_interface: load/store interface sharing the external-memory port.
//
// N clients (in the processor: trie fetch, text pump, result queue) each
// present a request with valid/ready handshake (req/gnt). The interface
// grants one request at a time in round-robin order, starting after the
// client granted last, and forwards it to the memory port. A read keeps the
// port busy until the memory returns its data (m_rvalid); the data is then
// steered to the client that asked, with a one-cycle rvalid pulse. A write
// completes when the memory accepts it. So at most one read is outstanding.
//
// Bandwidth sharing by a load/store interface follows the source design; the
// round-robin order, one outstanding read and the valid/ready protocol are
// this design's own.
// rst_n is both the asynchronous reset and the disable condition of the
// assertion at the end; a linter may report it as used synchronously and
// asynchronously, which is intended.
module ls_interface
  import vdp_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // clients
  input  logic [N-1:0]      c_req,
  input  logic [N-1:0]      c_we,
  input  logic [MEM_AW-1:0] c_addr  [N],
  input  logic [MEM_DW-1:0] c_wdata [N],
  output logic [N-1:0]      c_gnt,
  output logic [N-1:0]      c_rvalid,
  output logic [MEM_DW-1:0] c_rdata,
  // external memory
  output logic              m_req,
  output logic              m_we,
  output logic [MEM_AW-1:0] m_addr,
  output logic [MEM_DW-1:0] m_wdata,
  input  logic              m_ready,
  input  logic              m_rvalid,
  input  logic [MEM_DW-1:0] m_rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy;
  logic [IW-1:0] owner, last, sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!any && c_req[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
    m_req   = any && !busy;
    m_we    = c_we[sel];
    m_addr  = c_addr[sel];
    m_wdata = c_wdata[sel];
    c_gnt   = '0;
    if (m_req && m_ready) c_gnt[sel] = 1'b1;
    c_rvalid = '0;
    if (busy && m_rvalid) c_rvalid[owner] = 1'b1;
    c_rdata = m_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= IW'(N - 1);
    end else begin
      if (busy && m_rvalid) busy <= 1'b0;
      if (m_req && m_ready) begin
        last <= sel;
        if (!m_we) begin
          busy  <= 1'b1;
          owner <= sel;
        end
      end
    end
  end

  // A response must never arrive with no read outstanding.
  a_no_stray_rvalid: assert property (@(posedge clk) disable iff (!rst_n) m_rvalid |-> busy);

endmodule
