// ddr_model: behavioural model of the external DDR memory (not synthesizable).
//
// Sparse 16-byte-word memory behind a valid/ready request port. It accepts
// one request when idle. A read returns its word with a one-cycle rvalid
// after LAT_RAND cycles, or after LAT_SEQ cycles when its address follows
// the previous access (a burst continuation that only pays the column
// access). A write is stored at once and keeps the port busy for LAT_SEQ
// cycles. poke/peek give the testbench direct access; `hold` lets it
// refuse requests for a while to create back-pressure. The latencies default
// to 40 ns random access and an assumed 15 ns column access at 534 MHz.
module ddr_model
  import vdp_pkg::*;
#(
  parameter int unsigned LAT_RAND = 21,
  parameter int unsigned LAT_SEQ  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hold,     // test hook: refuse new requests
  input  logic              req,
  input  logic              we,
  input  logic [MEM_AW-1:0] addr,
  input  logic [MEM_DW-1:0] wdata,
  output logic              ready,
  output logic              rvalid,
  output logic [MEM_DW-1:0] rdata
);

  logic [MEM_DW-1:0] mem [logic [MEM_AW-1:0]];
  int unsigned       cnt;
  logic              rd_pend;
  logic [MEM_AW-1:0] rd_addr, last_addr;
  int unsigned       n_reads, n_writes;

  function automatic void poke(logic [MEM_AW-1:0] a, logic [MEM_DW-1:0] d);
    mem[a] = d;
  endfunction

  function automatic logic [MEM_DW-1:0] peek(logic [MEM_AW-1:0] a);
    if (mem.exists(a)) return mem[a];
    return '0;
  endfunction

  function automatic void clear_all();
    mem.delete();
  endfunction

  assign ready = (cnt == 0) && !rd_pend && !hold;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= 0;
      rd_pend   <= 1'b0;
      rvalid    <= 1'b0;
      rdata     <= '0;
      rd_addr   <= '0;
      last_addr <= '1;
      n_reads   <= 0;
      n_writes  <= 0;
    end else begin
      rvalid <= 1'b0;
      if (cnt > 1) cnt <= cnt - 1;
      else if (cnt == 1) begin
        cnt <= 0;
        if (rd_pend) begin
          rvalid  <= 1'b1;
          rdata   <= peek(rd_addr);
          rd_pend <= 1'b0;
        end
      end
      if (req && ready) begin
        last_addr <= addr;
        if (we) begin
          poke(addr, wdata);
          cnt       <= LAT_SEQ;
          n_writes  <= n_writes + 1;
        end else begin
          rd_pend <= 1'b1;
          rd_addr <= addr;
          cnt     <= (addr == last_addr + 1'b1) ? LAT_SEQ : LAT_RAND;
          n_reads <= n_reads + 1;
        end
      end
    end
  end

endmodule
