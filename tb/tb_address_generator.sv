// tb_address_generator: each selection must return the root, child, sibling
// or jump-node pointer, offset by the trie base, for random nodes.
module tb_address_generator;
  import vdp_pkg::*;
  ag_sel_e           sel;
  node_addr_t        root_addr, node_addr;
  trie_node_t        node;
  logic [MEM_AW-1:0] trie_base, mem_addr;
  int checks = 0, failures = 0;

  address_generator u_dut (.*);

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      node_addr_t e;
      node      = trie_node_t'({$urandom, $urandom, $urandom, $urandom});
      root_addr = node_addr_t'($urandom);
      trie_base = MEM_AW'($urandom);
      sel       = ag_sel_e'(i % 4);
      #1;
      case (i % 4)
        0: e = root_addr;
        1: e = node.child;
        2: e = node.sibling;
        default: e = node.jump_node;
      endcase
      checks++;
      if (node_addr !== e || mem_addr !== trie_base + MEM_AW'(e)) begin
        failures++; $display("FAIL: sel %0d -> %h/%h expected %h", i % 4, node_addr, mem_addr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
