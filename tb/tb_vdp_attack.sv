// tb_vdp_attack: deep-search attack workload on the full-size processor.
//
// A rule set of N_RULES random byte strings (16 to 64 bytes) is compiled into
// the shift-signature table and the trie by the reference package. Texts of
// TEXT_BYTES bytes are then built in which a given share of the segments are
// whole rules placed back to back (the deep-search attack: every rule
// occurrence passes the filter and walks its whole trie path), the rest
// random bytes. Attack shares of 0, 25, 50 and 100 % are each scanned
// without enhancements and with trie skip, prefetch and cache together. Every
// scan must report exactly the brute-force matches. The test prints cycles
// per byte for each case and checks that a heavier attack slows the scan,
// that prefetch and cache at least halve the demand reads of the trie, and
// that the enhancements shorten the scan under full attack.
// A sub-pattern attack follows: a rule of 66 'a' is in the set and the text
// is made of runs of 'a'; it is scanned plain, with trie skip only, and with
// all enhancements, and each must be faster than the one before.
// The processor keeps its default parameters; the rule set and the texts are
// far smaller than a real signature database, to keep the run short.
module tb_vdp_attack;
  import vdp_pkg::*;
  import vdp_ref_pkg::*;

  localparam int unsigned TEXT_BASE   = 24'h10_0000;
  localparam int unsigned RESULT_BASE = 24'h20_0000;
  localparam int unsigned TRIE_BASE   = 24'h00_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                 start, skip_en, prefetch_en, cache_en;
  pos_t                 text_len;
  logic                 busy, done;
  pos_t                 result_count;
  vdp_stats_t           stats;
  logic                 tbl_we;
  logic [TBL_IDX_W-1:0] tbl_waddr;
  ss_entry_t            tbl_wdata;
  logic                 match_valid;
  logic [PID_W-1:0]     match_pid;
  pos_t                 match_pos;
  logic                 m_req, m_we, m_ready, m_rvalid, hold;
  logic [MEM_AW-1:0]    m_addr;
  logic [MEM_DW-1:0]    m_wdata, m_rdata;

  vdp_top u_dut (
    .clk, .rst_n, .start,
    .text_base(MEM_AW'(TEXT_BASE)), .text_len,
    .trie_base(MEM_AW'(TRIE_BASE)), .result_base(MEM_AW'(RESULT_BASE)),
    .skip_en, .prefetch_en, .cache_en,
    .busy, .done, .result_count, .stats,
    .tbl_we, .tbl_waddr, .tbl_wdata,
    .match_valid, .match_pid, .match_pos,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata
  );

  ddr_model u_ddr (
    .clk, .rst_n, .hold, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .ready(m_ready), .rvalid(m_rvalid), .rdata(m_rdata)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect matches from the match port
  hit_t got [$];
  always @(posedge clk) if (match_valid) got.push_back('{pid: int'(match_pid), pos: int'(match_pos)});

  string pats [$];
  string text;
  hit_t  exp_hits [$];

  function automatic string rand_str(int n);
    string s = "";
    for (int i = 0; i < n; i++) begin
      byte c;
      c = byte'($urandom_range(1, 255));
      s = {s, string'(c)};
    end
    return s;
  endfunction

  function automatic bit prefix_free(string c);
    foreach (pats[k]) begin
      int l = (c.len() < pats[k].len()) ? c.len() : pats[k].len();
      if (c.substr(0, l - 1) == pats[k].substr(0, l - 1)) return 0;
    end
    return 1;
  endfunction

  // text of about `len` bytes: each segment is a whole rule with probability
  // pct %, otherwise 64 random bytes
  // sub = 1: the attack segments are runs of 66 to 200 'a' (sub-pattern attack)
  function automatic string attack_text(int len, int pct, bit sub);
    string s = "";
    while (s.len() < len) begin
      if ($urandom_range(0, 99) < pct) begin
        if (sub) begin
          int n;
          n = $urandom_range(66, 200);
          for (int i = 0; i < n; i++) s = {s, "a"};
        end else s = {s, pats[$urandom_range(1, pats.size() - 1)]};
      end else s = {s, rand_str(64)};
    end
    return s;
  endfunction

  task automatic load_text();
    for (int w = 0; w * 16 < text.len(); w++) begin
      logic [MEM_DW-1:0] line;
      line = '0;
      for (int b = 0; b < 16; b++)
        if (w * 16 + b < text.len()) line[8*b +: 8] = text[w*16 + b];
      u_ddr.poke(MEM_AW'(TEXT_BASE + w), line);
    end
    text_len = pos_t'(text.len());
    ref_matches(text, pats, exp_hits);
  endtask

  task automatic run_scan(bit opt, int pct, bit sub, output vdp_stats_t st);
    got.delete();
    skip_en = opt; prefetch_en = opt && !skip_only; cache_en = opt && !skip_only;
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    @(posedge clk);
    wait (done);
    @(posedge clk);
    st = stats;
    check(got.size() == exp_hits.size(),
          $sformatf("attack %0d%% opt %0d: %0d matches, expected %0d", pct, opt, got.size(), exp_hits.size()));
    for (int i = 0; i < exp_hits.size() && i < got.size(); i++)
      check(got[i].pid == exp_hits[i].pid && got[i].pos == exp_hits[i].pos,
            $sformatf("attack %0d%% opt %0d match %0d", pct, opt, i));
    check(int'(result_count) == exp_hits.size(), "result count");
    $display("%s attack %3d%% %s: %0d bytes, %0d cycles, %0d.%02d cycles/byte, alarms=%0d matches=%0d trie reads=%0d (+%0d prefetch) skips=%0d jumps=%0d",
             sub ? "sub-pattern" : "deep-search", pct, !opt ? "no enhancement     " : skip_only ? "trie skip only     " : "skip+prefetch+cache", text.len(), st.cycles,
             st.cycles / text.len(), (st.cycles * 100 / text.len()) % 100, st.alarms, st.pattern_hits,
             st.trie_demand_reads, st.trie_prefetch_reads, st.skip_events, st.jump_events);
    if (sub) $display("    cache hits=%0d of %0d nodes", st.cache_hits, st.node_cmps);
  endtask

  localparam int N_PCT = 4;
  localparam int N_RULES = 150;
  localparam int TEXT_BYTES = 6000;
  localparam int SUB_BYTES = 2000;
  bit skip_only = 1'b0;
  int          pcts [N_PCT] = '{0, 25, 50, 100};
  vdp_stats_t  plain [N_PCT], opt [N_PCT], sub_plain, sub_skip, sub_opt;

  initial begin
    start = 0; skip_en = 0; prefetch_en = 0; cache_en = 0; hold = 0;
    tbl_we = 0; tbl_waddr = '0; tbl_wdata = '0; text_len = '0;

    // rule set: the sub-pattern rule of 66 'a', then random byte strings of
    // 16 to 64 bytes, none a prefix of another
    pats.push_back({66{"a"}});
    while (pats.size() < N_RULES) begin
      string c;
      c = rand_str($urandom_range(16, 64));
      if (prefix_free(c)) pats.push_back(c);
    end
    build_table(pats, 8);
    build_trie(pats, 16);
    $display("rules=%0d trie nodes=%0d", pats.size(), nodes.size()); $fflush;
    foreach (nodes[a]) u_ddr.poke(MEM_AW'(TRIE_BASE + a), MEM_DW'(nodes[a]));

    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < (1 << TBL_IDX_W); i++) begin
      @(posedge clk);
      tbl_we    <= 1'b1;
      tbl_waddr <= TBL_IDX_W'(i);
      tbl_wdata <= tbl_get(i);
    end
    @(posedge clk); tbl_we <= 1'b0;

    foreach (pcts[i]) begin
      text = attack_text(TEXT_BYTES, pcts[i], 1'b0);
      load_text();
      run_scan(1'b0, pcts[i], 1'b0, plain[i]);
      run_scan(1'b1, pcts[i], 1'b0, opt[i]);
      if (pcts[i] > 0)
        check(opt[i].trie_demand_reads * 2 < plain[i].trie_demand_reads,
              $sformatf("attack %0d%%: prefetch and cache must halve the demand reads", pcts[i]));
    end
    // a heavier attack costs more time per byte
    for (int i = 1; i < N_PCT; i++)
      check(plain[i].cycles > plain[i-1].cycles, "a heavier attack slows the scan");
    check(opt[N_PCT-1].cycles < plain[N_PCT-1].cycles, "enhancements shorten the scan under full attack");

    // sub-pattern attack: the text is all runs of 'a'
    text = attack_text(SUB_BYTES, 100, 1'b1);
    load_text();
    run_scan(1'b0, 100, 1'b1, sub_plain);
    skip_only = 1'b1;
    run_scan(1'b1, 100, 1'b1, sub_skip);
    skip_only = 1'b0;
    run_scan(1'b1, 100, 1'b1, sub_opt);
    check(sub_skip.jump_events > 0, "sub-pattern attack: jump nodes used");
    check(sub_skip.trie_demand_reads * 2 < sub_plain.trie_demand_reads,
          "sub-pattern attack: trie skip at least halves the trie reads");
    check(sub_opt.cache_hits * 2 > sub_opt.node_cmps, "sub-pattern attack: most nodes come from the cache");
    check(sub_opt.cycles < sub_skip.cycles && sub_skip.cycles < sub_plain.cycles,
          "sub-pattern attack: each enhancement shortens the scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
