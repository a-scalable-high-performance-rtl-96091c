// result_queue: matched-pattern FIFO and writer to the output area.
//
// The exact-matching engine pushes one record {pattern ID, text position}
// per matched pattern. The queue holds up to DEPTH records and drains them,
// oldest first, as write requests on its load/store-interface client: the
// n-th record since `start` goes to word result_base + n of external memory
// (the "output result" area). When the queue is full `push_ready` is low and
// the engine waits. `count` is the number of records written so far and
// `empty` says nothing is left to write.
//
// The queue and the output area follow the source design; the depth of 16,
// the record layout (vdp_pkg::result_t) and one record per word are this
// design's own.
module result_queue
  import vdp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW-1:0] result_base,
  // from the exact-matching engine
  input  logic              push,
  input  logic [PID_W-1:0]  push_pid,
  input  pos_t              push_pos,
  output logic              push_ready,
  // load/store interface client (writes only)
  output logic              req,
  output logic [MEM_AW-1:0] addr,
  output logic [MEM_DW-1:0] wdata,
  input  logic              gnt,
  // status
  output pos_t              count,
  output logic              empty,
  output logic              ev_full
);

  localparam int unsigned AW = $clog2(DEPTH);

  result_t       fifo [DEPTH];
  logic [AW:0]   wr_ptr, rd_ptr;
  logic          full;

  always_comb begin
    empty      = (wr_ptr == rd_ptr);
    full       = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
    push_ready = !full;
    req        = !empty;
    addr       = result_base + MEM_AW'(count);
    wdata      = fifo[rd_ptr[AW-1:0]];
    ev_full    = push && full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (start) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) wr_ptr <= wr_ptr + 1'b1;
      if (req && gnt) begin
        rd_ptr <= rd_ptr + 1'b1;
        count  <= count + pos_t'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) fifo[wr_ptr[AW-1:0]] <= '{rsvd: '0, pid: push_pid, pos: push_pos};
  end

endmodule
