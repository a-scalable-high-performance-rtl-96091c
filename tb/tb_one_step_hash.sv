// tb_one_step_hash: the root address must be the top ROOT_BITS bits of the
// 32-bit product slice * 0x9E3779B1; also checks that the hash spreads
// slices that differ in one character.
module tb_one_step_hash;
  import vdp_pkg::*;
  logic [31:0] slice;
  node_addr_t  root_addr;
  int checks = 0, failures = 0;
  int seen [int];

  one_step_hash u_dut (.*);

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint unsigned p;
      slice = (i < 256) ? {24'h746865, 8'(i)} : $urandom;   // "the?" then random
      #1;
      p = (longint'(slice) * 64'h9E3779B1) & 64'hFFFF_FFFF;
      checks++;
      if (root_addr !== node_addr_t'(p >> 16)) begin
        failures++; $display("FAIL: slice %h -> %h expected %h", slice, root_addr, p >> 16);
      end
      if (i < 256) seen[int'(root_addr)] = 1;
    end
    checks++;
    if (seen.size() < 250) begin failures++; $display("FAIL: only %0d distinct roots", seen.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
