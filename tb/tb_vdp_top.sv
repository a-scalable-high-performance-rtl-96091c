// tb_vdp_top: end-to-end test of the virus detection processor at its
// default parameters (32 kB shift-signature table, 2^16 trie roots).
//
// A pattern set of random byte patterns plus hand-made ones is turned into
// a shift-signature table and a trie table by the reference package; the
// trie and a ~3.9 kB text go into the behavioural DDR model. The text mixes
// random data, planted pattern occurrences, a deep-search attack (patterns
// and pattern fragments back to back), a sub-pattern attack ("aaa...") and
// the jump-node example "thereisapatternlength". The text is scanned four
// times: (a) no enhancement, (b) trie skip, (c) skip + prefetch,
// (d) skip + prefetch + cache. Every scan must report exactly the matches
// of a brute-force search, in order, both on the match port and in the
// output area. The test also checks that the enhancements cut external trie
// reads, that prefetch with cache shortens the scan, and that every
// mechanism of the design occurred at least once.
module tb_vdp_top;
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect matches from the match port
  hit_t got [$];
  always @(posedge clk) if (match_valid) got.push_back('{pid: int'(match_pid), pos: int'(match_pos)});

  // back-pressure cycles observed
  int pump_blocked = 0, ls_conflicts = 0;
  always @(posedge clk) begin
    if (busy && !u_dut.tb_space) pump_blocked++;
    if ($countones(u_dut.ls_req) > 1) ls_conflicts++;
  end

  // memory back-pressure window: once `hold_at_g` matches are seen, the
  // memory refuses requests for 3000 cycles
  int hold_at_g = -1, hold_cnt = 0;
  always @(posedge clk) begin
    if (hold_cnt > 0) begin
      hold_cnt--;
      if (hold_cnt == 0) hold <= 1'b0;
    end else if (hold_at_g >= 0 && got.size() > hold_at_g) begin
      hold      <= 1'b1;
      hold_cnt  = 3000;
      hold_at_g = -1;
    end
  end

  string pats [$];
  string text;
  hit_t  exp_hits [$];

  function automatic string rand_str(int n, int alpha);
    string s = "";
    for (int i = 0; i < n; i++) begin
      byte c = (alpha == 0) ? byte'($urandom_range(1, 255)) : byte'(8'h61 + $urandom_range(0, alpha - 1));
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

  task automatic run_scan(bit sk, bit pf, bit ca, int hold_at, output vdp_stats_t st);
    got.delete();
    skip_en = sk; prefetch_en = pf; cache_en = ca;
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    @(posedge clk);
    hold_at_g = hold_at;
    wait (done);
    @(posedge clk);
    st = stats;
    check(got.size() == exp_hits.size(),
          $sformatf("scan %0d%0d%0d: %0d matches, expected %0d", sk, pf, ca, got.size(), exp_hits.size()));
    for (int i = 0; i < exp_hits.size() && i < got.size(); i++)
      check(got[i].pid == exp_hits[i].pid && got[i].pos == exp_hits[i].pos,
            $sformatf("scan %0d%0d%0d match %0d: got (%0d,%0d) expected (%0d,%0d)", sk, pf, ca, i,
                      got[i].pid, got[i].pos, exp_hits[i].pid, exp_hits[i].pos));
    check(int'(result_count) == exp_hits.size(), "result count");
    for (int i = 0; i < exp_hits.size(); i++) begin
      result_t r;
      r = result_t'(u_ddr.peek(MEM_AW'(RESULT_BASE + i)));
      check(int'(r.pid) == exp_hits[i].pid && int'(r.pos) == exp_hits[i].pos,
            $sformatf("scan %0d%0d%0d output word %0d", sk, pf, ca, i));
    end
    $display("scan skip=%0d prefetch=%0d cache=%0d: cycles=%0d checks=%0d shifts=%0d sigf=%0d alarms=%0d nodes=%0d sib=%0d hits=%0d skip=%0d/%0dB jump=%0d dreads=%0d preads=%0d pfhit=%0d chit=%0d",
             sk, pf, ca, st.cycles, st.fe_checks, st.fe_shifts, st.fe_sig_filtered, st.alarms,
             st.node_cmps, st.sibling_steps, st.pattern_hits, st.skip_events, st.skipped_bytes,
             st.jump_events, st.trie_demand_reads, st.trie_prefetch_reads, st.prefetch_hits, st.cache_hits);
  endtask

  vdp_stats_t sa, sb, sc, sd;

  initial begin
    start = 0; skip_en = 0; prefetch_en = 0; cache_en = 0; hold = 0;
    tbl_we = 0; tbl_waddr = '0; tbl_wdata = '0; text_len = '0;

    // ---------- pattern set ----------
    pats.push_back("thereisapatternset");   // jump-node example
    pats.push_back("patternlength");
    pats.push_back("thereisarule");          // skip example
    pats.push_back("blockade");
    pats.push_back({66{"a"}});               // sub-pattern attack rule
    pats.push_back("virusAAAsig1");          // shares its first node
    pats.push_back("virusBBBsig2");
    while (pats.size() < 40) begin
      string c;
      c = rand_str($urandom_range(8, 40), (pats.size() % 2) ? 0 : 6);
      if (prefix_free(c)) pats.push_back(c);
    end
    $display("pattern set ready"); $fflush;
    build_table(pats, 8);
    $display("table built"); $fflush;
    build_trie(pats, 16);
    $display("trie built"); $fflush;

    // ---------- text ----------
    text = "";
    for (int seg = 0; seg < 12; seg++) begin
      text = {text, rand_str($urandom_range(40, 120), 0)};
      text = {text, pats[$urandom_range(5, pats.size() - 1)]};
    end
    text = {text, "thereisasetonthelastblockade"};
    text = {text, "thereisapatternlength"};
    // deep-search attack: patterns and fragments back to back
    for (int i = 0; i < 30; i++) begin
      string p;
      p = pats[$urandom_range(5, pats.size() - 1)];
      text = {text, (i % 3 == 2) ? p.substr(0, p.len() - 2) : p};
    end
    text = {text, rand_str(64, 0)};
    // sub-pattern attack
    text = {text, {160{"a"}}};
    text = {text, rand_str(200, 0)};
    // long tail so that the pump runs ahead of the filter and fills the buffer
    text = {text, rand_str(1500, 0)};
    text_len = pos_t'(text.len());
    ref_matches(text, pats, exp_hits);
    $fflush; $display("patterns=%0d trie nodes=%0d text=%0d bytes expected matches=%0d",
             pats.size(), nodes.size(), text.len(), exp_hits.size());

    // ---------- memory image ----------
    foreach (nodes[a]) u_ddr.poke(MEM_AW'(TRIE_BASE + a), MEM_DW'(nodes[a]));
    for (int w = 0; w * 16 < text.len(); w++) begin
      logic [MEM_DW-1:0] line = '0;
      for (int b = 0; b < 16; b++)
        if (w * 16 + b < text.len()) line[8*b +: 8] = text[w*16 + b];
      u_ddr.poke(MEM_AW'(TEXT_BASE + w), line);
    end

    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // ---------- load the shift-signature table ----------
    for (int i = 0; i < (1 << TBL_IDX_W); i++) begin
      @(posedge clk);
      tbl_we    <= 1'b1;
      tbl_waddr <= TBL_IDX_W'(i);
      tbl_wdata <= tbl_get(i);
    end
    @(posedge clk); tbl_we <= 1'b0;

    run_scan(0, 0, 0, -1, sa);
    run_scan(1, 0, 0, -1, sb);
    run_scan(1, 1, 0, -1, sc);
    run_scan(1, 1, 1, exp_hits.size() - 80, sd);

    // ---------- enhancements and mechanisms ----------
    check(sb.trie_demand_reads < sa.trie_demand_reads, "skip reduces trie reads");
    check(sc.trie_demand_reads < sb.trie_demand_reads, "prefetch reduces demand reads");
    check(sd.trie_demand_reads + sd.trie_prefetch_reads <
          sc.trie_demand_reads + sc.trie_prefetch_reads, "cache reduces trie reads");
    check(sd.cycles < sb.cycles, "prefetch and cache shorten the scan");
    check(sa.fe_checks < sa.cycles, "filter checks at most one window per cycle");
    check(sa.fe_shifts > 0,           "mechanism: shift by shift value");
    check(sa.fe_sig_filtered > 0,     "mechanism: signature filtering");
    check(sa.alarms > sa.pattern_hits, "mechanism: false alarm");
    check(sa.pattern_hits > 0,        "mechanism: pattern reported");
    check(sa.sibling_steps > 0,       "mechanism: sibling traversal");
    check(sb.skip_events > 0,         "mechanism: trie skip");
    check(sb.jump_events > 0,         "mechanism: jump node");
    check(sc.prefetch_hits > 0,       "mechanism: prefetch hit");
    check(sd.cache_hits > 0,          "mechanism: cache hit");
    check(sa.fe_text_stalls > 0,      "mechanism: filter waits for text");
    check(sa.mem_stall_cycles > 0,    "mechanism: exact matcher waits for memory");
    check(sd.result_full_stalls > 0,  "mechanism: result queue full");
    check(pump_blocked > 0,           "mechanism: text buffer full");
    check(ls_conflicts > 0,           "mechanism: load/store arbitration");
    $display("pump blocked cycles=%0d, arbitration conflicts=%0d, queue-full cycles=%0d",
             pump_blocked, ls_conflicts, sd.result_full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
