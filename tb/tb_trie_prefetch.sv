// tb_trie_prefetch: node requests in runs of consecutive addresses and
// random jumps, with the unit enabled and disabled, against the DDR model.
// Every response must carry the node of its address. With prefetch on, a
// request is a prefetch hit exactly when it asks for the address after the
// previous request; with prefetch off there are no hits and no prefetch
// reads. Prefetching must also make a sequential run faster.
module tb_trie_prefetch;
  import vdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic en = 1, flush = 0, req = 0, resp_valid, d_req, d_gnt, d_rvalid;
  logic ev_demand_read, ev_prefetch_read, ev_pf_hit;
  logic [MEM_AW-1:0] addr = '0, d_addr;
  logic [MEM_DW-1:0] resp_data, d_rdata;
  int checks = 0, failures = 0, hits = 0, preads = 0, exp_hits = 0;

  trie_prefetch u_dut (.*);
  ddr_model u_mem (.clk, .rst_n, .hold(1'b0), .req(d_req), .we(1'b0), .addr(d_addr), .wdata('0),
                   .ready(d_gnt), .rvalid(d_rvalid), .rdata(d_rdata));

  function automatic logic [MEM_DW-1:0] node_of(logic [MEM_AW-1:0] a);
    return {a, 8'hA5, ~a, 32'hBEEF_0000 | 32'(a), 40'(a) * 40'd91};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev_pf_hit) hits++;
    if (ev_prefetch_read) preads++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [MEM_AW-1:0] prev = '1;

  task automatic access(logic [MEM_AW-1:0] a, int think);
    @(negedge clk);
    req = 1; addr = a;
    @(negedge clk);
    req = 0;
    while (!resp_valid) @(negedge clk);
    checks++;
    if (resp_data !== node_of(a)) begin failures++; $display("FAIL: addr %h data", a); end
    if (en && a == prev + 1'b1) exp_hits++;
    prev = a;
    repeat (think) @(negedge clk);
  endtask

  int t0, t1, t2;

  initial begin
    for (int i = 0; i < 4096; i++) u_mem.poke(MEM_AW'(i), node_of(MEM_AW'(i)));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      logic [MEM_AW-1:0] b;
      int n;
      b = MEM_AW'($urandom_range(0, 4000));
      n = $urandom_range(1, 6);
      if (r == 150) en = 0;
      if (r == 200) en = 1;
      for (int k = 0; k < n; k++) access(b + MEM_AW'(k), $urandom_range(0, 12));
    end
    checks++;
    if (hits != exp_hits) begin failures++; $display("FAIL: %0d prefetch hits, expected %0d", hits, exp_hits); end
    // timing: a 20-node run with and without prefetch
    en = 1; t0 = int'($time);
    for (int k = 0; k < 20; k++) access(MEM_AW'(3000 + k), 4);
    t1 = int'($time);
    en = 0; preads = 0;
    for (int k = 0; k < 20; k++) access(MEM_AW'(3500 + k), 4);
    t2 = int'($time);
    checks++;
    if (!(t1 - t0 < t2 - t1)) begin failures++; $display("FAIL: prefetch not faster (%0d vs %0d)", t1 - t0, t2 - t1); end
    checks++;
    if (preads > 1) begin failures++; $display("FAIL: prefetch reads while disabled"); end
    $display("hits=%0d run with prefetch %0d, without %0d", hits, t1 - t0, t2 - t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
