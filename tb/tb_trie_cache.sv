// tb_trie_cache: random node requests from a small address pool against a
// downstream responder with a 6-cycle latency. Every response must carry
// the node of its address; whether a request hits is predicted by an
// independent direct-mapped model (64 lines, index = low address bits).
// Also checks that nothing hits with the cache disabled and after a flush.
module tb_trie_cache;
  import vdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, flush = 0, req = 0, resp_valid, d_req, d_resp_valid = 0, ev_hit;
  logic [MEM_AW-1:0] addr = '0, d_addr;
  logic [MEM_DW-1:0] resp_data, d_resp_data = '0;
  int checks = 0, failures = 0, hits = 0;
  logic [MEM_AW-1:0] mtag [64];
  bit                mval [64];

  trie_cache #(.LINES(64)) u_dut (.*);

  function automatic logic [MEM_DW-1:0] node_of(logic [MEM_AW-1:0] a);
    return {~a, 8'h5A, a, 32'hFEED_0000 | 32'(a), 40'(a) * 40'd77};
  endfunction

  // downstream responder
  initial begin
    forever begin
      @(posedge clk);
      if (d_req) begin
        logic [MEM_AW-1:0] a;
        a = d_addr;
        repeat (5) @(posedge clk);
        d_resp_valid <= 1; d_resp_data <= node_of(a);
        @(posedge clk);
        d_resp_valid <= 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic access(logic [MEM_AW-1:0] a);
    bit exp_hit;
    int idx = int'(a[5:0]);
    exp_hit = en && mval[idx] && mtag[idx] == a;
    @(negedge clk);
    req = 1; addr = a;
    #0.1;
    checks++;
    if (ev_hit !== exp_hit || d_req !== !exp_hit) begin
      failures++; $display("FAIL: addr %h hit %b expected %b", a, ev_hit, exp_hit);
    end
    if (ev_hit) hits++;
    @(negedge clk);
    req = 0;
    while (!resp_valid) @(negedge clk);
    checks++;
    if (resp_data !== node_of(a)) begin failures++; $display("FAIL: addr %h data", a); end
    if (en) begin mval[idx] = 1; mtag[idx] = a; end
  endtask

  initial begin
    foreach (mval[i]) mval[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      if (i == 500) en = 0;
      if (i == 700) en = 1;
      if (i == 1000) begin
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        foreach (mval[k]) mval[k] = 0;
      end
      access(MEM_AW'($urandom_range(0, 95)) + MEM_AW'((i % 3) * 24'h1000));
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL: only %0d hits", hits); end
    $display("hits=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
