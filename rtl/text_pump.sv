// text_pump: streams the input text from external memory into the buffer.
//
// After a `start` pulse it reads the ceil(text_len/16) memory words of the text, in
// address order from text_base, one request at a time, and writes each
// returned word into the text buffer as the next line. It issues a request
// only while the buffer reports space, so it runs ahead of the pattern
// pointer by up to the buffer size and overlaps text reading with matching.
// Sequential addresses let the external memory serve the stream at its
// faster burst latency. `eof` rises once the last line is written.
//
// The pump's role follows the source design; the request protocol (one
// outstanding read on a valid/ready port, response by rvalid) is this
// design's own and matches ls_interface.
module text_pump
  import vdp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW-1:0] text_base,
  input  pos_t              text_len,
  // to the load/store interface
  output logic              req,
  output logic [MEM_AW-1:0] addr,
  input  logic              gnt,
  input  logic              rvalid,
  input  logic [MEM_DW-1:0] rdata,
  // to the text buffer
  input  logic              space,
  output logic              wr_en,
  output logic [MEM_DW-1:0] wr_line,
  output logic [7:0]        inflight,
  output logic              eof
);

  pos_t total_lines, issued, received;
  logic outstanding;
  logic active;        // between start and the last request

  always_comb begin
    total_lines = (text_len >> 4) + pos_t'(text_len[3:0] != 4'd0);
    req      = active && !outstanding && (issued < total_lines) && space;
    addr     = text_base + MEM_AW'(issued);
    wr_en    = rvalid && outstanding;
    wr_line  = rdata;
    inflight = {7'd0, outstanding};
    eof      = (received == total_lines);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issued      <= '0;
      received    <= '0;
      outstanding <= 1'b0;
      active      <= 1'b0;
    end else if (start) begin
      issued      <= '0;
      received    <= '0;
      outstanding <= 1'b0;
      active      <= 1'b1;
    end else begin
      if (eof) active <= 1'b0;
      if (req && gnt) begin
        issued      <= issued + pos_t'(1);
        outstanding <= 1'b1;
      end
      if (rvalid && outstanding) begin
        received    <= received + pos_t'(1);
        outstanding <= 1'b0;
      end
    end
  end

endmodule
