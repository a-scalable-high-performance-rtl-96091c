// tb_exact_matching_engine: the exact matcher against a node memory with a
// 4-cycle latency and a fully present text.
//  1. Skip example: patterns {thereisapatternset, patternlength,
//     thereisarule}, text "thereisasetonthelast...": the alarm at 0 walks
//     ther, eisa, then the siblings patt and rule, mismatches, and must hand
//     back pointer 8 (skip value 8) without a report.
//  2. Jump example: text "thereisapatternlength": the walk mismatches at
//     erns, jumps to ernl with suffix offset 4, reports pattern 1 at 8 and
//     hands back 8 + 11 = 19. Without skip it reports nothing and hands back
//     1.
//  3. Random pattern set and text, an alarm raised at every position the
//     engine hands back: with and without skip, the reports must equal a
//     brute-force search, and skipping must need fewer alarms.
module tb_exact_matching_engine;
  import vdp_pkg::*;
  import vdp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic skip_en = 1, alarm_valid = 0, done, tb_avail, n_req, n_valid = 0, r_valid, r_ready = 1, busy;
  logic ev_node_cmp, ev_sibling, ev_match, ev_skip, ev_jump, ev_mem_stall;
  logic [SKIP_W-1:0] skip_bytes;
  pos_t text_len = '0, alarm_pos = '0, resume_ptr, tb_addr, r_pos, cur_ptr;
  logic [MEM_AW-1:0] trie_base = 24'h40, n_addr;
  trie_node_t n_data = '0;
  logic [31:0] tb_data;
  logic [PID_W-1:0] r_pid;
  int checks = 0, failures = 0, jumps = 0, sibs = 0, alarms = 0;
  string text, pats [$];
  hit_t got [$], hits [$];

  exact_matching_engine #(.ROOT_BITS(16)) u_dut (.*);

  always_comb begin
    for (int i = 0; i < 4; i++)
      tb_data[31-8*i -: 8] = (int'(tb_addr) + i < text.len()) ? text[int'(tb_addr) + i] : 8'h00;
    tb_avail = 1'b1;
  end

  // node memory
  initial forever begin
    @(posedge clk);
    if (n_req) begin
      int a;
      a = int'(n_addr) - int'(trie_base);
      repeat (3) @(posedge clk);
      n_valid <= 1; n_data <= get_node(a);
      @(posedge clk);
      n_valid <= 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (r_valid && r_ready) got.push_back('{pid: int'(r_pid), pos: int'(r_pos)});
    if (ev_jump) jumps++;
    if (ev_sibling) sibs++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one_alarm(int p, output int resume);
    @(negedge clk);
    alarm_valid = 1; alarm_pos = pos_t'(p);
    @(negedge clk);
    alarm_valid = 0;
    while (!done) @(negedge clk);
    resume = int'(resume_ptr);
    alarms++;
  endtask

  task automatic whole_text(bit sk);
    int p = 0, r;
    skip_en = sk; got.delete(); alarms = 0;
    while (p + 8 <= text.len()) begin
      one_alarm(p, r);
      checks++;
      if (r <= p) begin failures++; $display("FAIL: pointer did not advance"); break; end
      p = r;
    end
    checks++;
    if (got.size() != hits.size()) begin failures++; $display("FAIL: skip=%0d %0d reports expected %0d", sk, got.size(), hits.size()); end
    for (int i = 0; i < got.size() && i < hits.size(); i++) begin
      checks++;
      if (got[i].pid != hits[i].pid || got[i].pos != hits[i].pos) begin
        failures++; $display("FAIL: report %0d (%0d,%0d) expected (%0d,%0d)", i, got[i].pid, got[i].pos, hits[i].pid, hits[i].pos);
      end
    end
  endtask

  function automatic string rs(int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(byte'(8'h61 + $urandom_range(0, 3)))};
    return s;
  endfunction

  function automatic bit pfree(string c);
    foreach (pats[k]) begin
      int l = (c.len() < pats[k].len()) ? c.len() : pats[k].len();
      if (c.substr(0, l - 1) == pats[k].substr(0, l - 1)) return 0;
    end
    return 1;
  endfunction

  int r, a_without, a_with;

  initial begin
    pats = '{"thereisapatternset", "patternlength", "thereisarule"};
    build_trie(pats, 16);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. skip example
    text = "thereisasetonthelastblock";
    text_len = pos_t'(text.len());
    got.delete(); sibs = 0;
    one_alarm(0, r);
    checks++;
    if (r != 8 || got.size() != 0 || sibs != 1) begin failures++; $display("FAIL: skip example resume %0d reports %0d siblings %0d", r, got.size(), sibs); end
    // 2. jump example
    text = "thereisapatternlength";
    text_len = pos_t'(text.len());
    got.delete(); jumps = 0;
    one_alarm(0, r);
    checks++;
    if (r != 19 || jumps != 1 || got.size() != 1) begin failures++; $display("FAIL: jump example resume %0d jumps %0d reports %0d", r, jumps, got.size()); end
    else begin
      checks++;
      if (got[0].pid != 1 || got[0].pos != 8) begin failures++; $display("FAIL: jump example report (%0d,%0d)", got[0].pid, got[0].pos); end
    end
    skip_en = 0; got.delete(); jumps = 0;
    one_alarm(0, r);
    checks++;
    if (r != 1 || jumps != 0 || got.size() != 0) begin failures++; $display("FAIL: no-skip example resume %0d", r); end
    // 3. random
    pats.delete();
    while (pats.size() < 25) begin
      string c;
      c = rs($urandom_range(8, 24));
      if (pfree(c)) pats.push_back(c);
    end
    build_trie(pats, 16);
    text = "";
    while (text.len() < 1200) text = {text, rs($urandom_range(0, 20)), pats[$urandom_range(0, 24)]};
    text_len = pos_t'(text.len());
    ref_matches(text, pats, hits);
    whole_text(0); a_without = alarms;
    whole_text(1); a_with = alarms;
    checks++;
    if (a_with >= a_without) begin failures++; $display("FAIL: skip did not save alarms"); end
    $display("random: %0d occurrences, alarms %0d without skip, %0d with skip, %0d jumps", hits.size(), a_without, a_with, jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
