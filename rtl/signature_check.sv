// signature_check: second-level filter of the shift-signature algorithm.
//
// When a table entry has its S-flag clear, its carry holds a signature: the OR
// of one-bit-per-pattern Bloom vectors of every pattern whose search-window
// tail maps to that entry. This block hashes the 4-character search window
// with a single hash function to one of SIG_W bit positions and reports a hit
// when that bit is set in the signature. A single hash function and a
// signature as wide as the carry follow the source design; the hash itself
// (XOR-fold of the four characters, modulo SIG_W) is this design's choice, and
// the table builder must use the same one.
//
// Purely combinational.
module signature_check
  import vdp_pkg::*;
#(
  parameter int unsigned SIG_W = CARRY_W
) (
  input  logic [8*WIN_CHARS-1:0] window,     // window[31:24] = first char
  input  logic [SIG_W-1:0]       signature,
  output logic [SIG_W-1:0]       text_sig,   // one-hot signature of window
  output logic                   hit
);

  logic [7:0] fold;

  always_comb begin
    fold = '0;
    for (int i = 0; i < WIN_CHARS; i++) fold ^= window[8*i +: 8];
    text_sig = '0;
    text_sig[32'(fold) % SIG_W] = 1'b1;
    hit = |(text_sig & signature);
  end

endmodule
