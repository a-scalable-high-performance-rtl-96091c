// tb_signature_check: random windows and signatures against the signature
// rule: bit ((c0 ^ c1 ^ c2 ^ c3) mod 3) of the signature must be set.
module tb_signature_check;
  import vdp_pkg::*;
  logic [31:0] window;
  logic [2:0]  signature, text_sig;
  logic        hit;
  int checks = 0, failures = 0;

  signature_check u_dut (.*);

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int unsigned b, x;
      window    = $urandom;
      signature = 3'($urandom_range(0, 7));
      #1;
      x = 0;
      for (int k = 0; k < 4; k++) x = x ^ ((window >> (8 * k)) & 32'hff);
      b = x % 3;
      checks++;
      if (text_sig !== (3'b001 << b) || hit !== signature[b]) begin
        failures++;
        $display("FAIL: window %h sig %b -> text_sig %b hit %b, expected bit %0d", window, signature, text_sig, hit, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
