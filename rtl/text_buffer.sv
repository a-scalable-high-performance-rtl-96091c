// text_buffer: on-chip window of the input text shared by both engines.
//
// A circular buffer of LINES lines of 16 bytes. The text pump appends whole
// lines in text order; line k of the text lives in slot k mod LINES. Two
// combinational read ports return four consecutive bytes at any byte
// position: port A serves the filtering engine's search window, port B the
// exact-matching engine's text slice. A read is `avail` once every byte it
// covers has been written, or at any position once `eof` says the pump has
// delivered the last line (bytes past the text end are then don't-care and
// the engines mask them with the text length).
//
// retire_pos is the lowest byte position still needed (the pattern pointer);
// lines wholly below it may be overwritten, and `space` tells the pump it may
// issue one more line (counting lines still in flight, `inflight`).
//
// The buffer's existence and role follow the source design; its size
// (LINES = 128, 2 kB) and organisation are this design's own. An exact match
// may look ahead of the pattern pointer by at most the buffer size minus one
// line, so patterns must be shorter than that.
module text_buffer
  import vdp_pkg::*;
#(
  parameter int unsigned LINES = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,      // start of a new text
  // write side (text pump)
  input  logic              wr_en,
  input  logic [MEM_DW-1:0] wr_line,    // byte 0 of the line in [7:0]
  input  logic              eof,
  input  logic [7:0]        inflight,
  output logic              space,
  input  pos_t              retire_pos,
  // read port A
  input  pos_t              a_addr,
  output logic [31:0]       a_data,     // [31:24] = byte at a_addr
  output logic              a_avail,
  // read port B
  input  pos_t              b_addr,
  output logic [31:0]       b_data,
  output logic              b_avail
);

  localparam int unsigned LW = $clog2(LINES);

  logic [MEM_DW-1:0] mem [LINES];
  pos_t              lines_written;  // absolute count of lines written
  pos_t              retire_line;

  function automatic logic [31:0] read4(pos_t addr);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) begin
      pos_t          b;
      logic [LW-1:0] slot;
      b    = addr + pos_t'(i);
      slot = b[LW+3:4];
      r[31-8*i -: 8] = mem[slot][8*b[3:0] +: 8];
    end
    return r;
  endfunction

  function automatic logic covered(pos_t addr);
    // highest byte addr+3 must lie in a written line
    return (33'(addr) + 33'd4) <= (33'(lines_written) << 4);
  endfunction

  always_comb begin
    retire_line = retire_pos >> 4;
    space   = (lines_written + pos_t'(inflight)) < (retire_line + pos_t'(LINES));
    a_data  = read4(a_addr);
    b_data  = read4(b_addr);
    a_avail = eof || covered(a_addr);
    b_avail = eof || covered(b_addr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lines_written <= '0;
    else if (clear) lines_written <= '0;
    else if (wr_en) lines_written <= lines_written + pos_t'(1);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[lines_written[LW-1:0]] <= wr_line;
  end

  initial assert (LINES >= 4 && (LINES & (LINES - 1)) == 0)
    else $error("LINES must be a power of two");

endmodule
