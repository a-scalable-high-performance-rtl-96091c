// shift_sig_table: the on-chip shift-signature table of the filtering engine.
//
// A 2^IDX_W x 4-bit SRAM (32 kB at the default 2^16 entries), indexed by the
// 2-character bad character. Each entry is {S-flag, 3-bit carry}; see
// vdp_pkg. The size and entry format follow the source design (32 kB =
// 4 x 2^16 bits). The port arrangement is this design's own: one synchronous
// read port used by the filtering engine and one write port through which the
// host loads the table before a scan.
//
// Timing: rd_data shows the entry addressed by rd_addr in the cycle after
// rd_en is high, and holds it while rd_en is low. A write is visible to a
// read issued in a later cycle.
module shift_sig_table
  import vdp_pkg::*;
#(
  parameter int unsigned IDX_W = TBL_IDX_W
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_addr,
  output ss_entry_t        rd_data,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  ss_entry_t        wr_data
);

  ss_entry_t mem [2**IDX_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
