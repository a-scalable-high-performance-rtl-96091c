// address_generator: next trie-node address of the exact-matching engine.
//
// Picks the address of the next node to read, as the exact-matching flow
// requires:
//   AG_ROOT    first read of an alarm: root of the hashed lightweight trie
//   AG_CHILD   node matched, descend: child pointer of the current node
//   AG_SIBLING node mismatched, try the alternative: sibling pointer
//   AG_JUMP    trie-skip with jump enabled: the node's jump node
// and converts the node index to an external-memory word address in the
// trie-table region starting at trie_base. One node occupies one word.
//
// The four sources follow the source design; the word mapping is this
// design's own. Purely combinational.
module address_generator
  import vdp_pkg::*;
(
  input  ag_sel_e           sel,
  input  node_addr_t        root_addr,
  input  trie_node_t        node,       // node read last
  input  logic [MEM_AW-1:0] trie_base,
  output node_addr_t        node_addr,
  output logic [MEM_AW-1:0] mem_addr
);

  always_comb begin
    unique case (sel)
      AG_ROOT:    node_addr = root_addr;
      AG_CHILD:   node_addr = node.child;
      AG_SIBLING: node_addr = node.sibling;
      AG_JUMP:    node_addr = node.jump_node;
    endcase
    mem_addr = trie_base + MEM_AW'(node_addr);
  end

endmodule
