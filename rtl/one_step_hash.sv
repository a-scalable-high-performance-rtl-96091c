// one_step_hash: root address of a lightweight trie.
//
// The exact-matching engine splits the pattern trie into many small tries,
// one per value of a hash of their first node (the first four characters of
// a pattern). The hash of the text slice at a candidate position is the
// address of that trie's root node, so the search starts with a short
// sibling list instead of walking one long list from a single root. Roots
// that share a hash value are chained as siblings.
//
// Hashing the root node into multiple entrances follows the source design.
// The hash is this design's choice: Fibonacci (multiplicative) hashing of
// the 32-bit slice, keeping the top ROOT_BITS bits of the product with
// 0x9E3779B1. The table builder must use the same function.
//
// Purely combinational.
module one_step_hash
  import vdp_pkg::*;
#(
  parameter int unsigned ROOT_BITS = 16
) (
  input  logic [31:0]      slice,      // [31:24] = first character
  output node_addr_t       root_addr
);

  logic [31:0] prod;

  always_comb begin
    prod      = slice * 32'h9E37_79B1;
    root_addr = node_addr_t'(prod[31 -: ROOT_BITS]);
  end

endmodule
