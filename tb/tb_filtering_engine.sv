// tb_filtering_engine: loads a shift-signature table built from a random
// pattern set, feeds a 1500-byte text (first arriving slowly, then fully
// present) and answers each alarm after a few cycles with "resume at
// alarm + 1". The sequence of alarm positions must equal that of an
// independent model of the filtering rule, no pattern occurrence may be
// missed, the number of table lookups must match the model, and with the
// whole text present the engine must do one lookup per clock cycle.
module tb_filtering_engine;
  import vdp_pkg::*;
  import vdp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, tb_avail, tbl_we = 0, alarm_valid, eme_done = 0, busy, done;
  logic ev_check, ev_shift, ev_sig_filtered, ev_alarm, ev_text_stall;
  pos_t text_len = '0, tb_addr, alarm_pos, eme_resume_ptr = '0, ptr;
  logic [31:0] tb_data;
  logic [TBL_IDX_W-1:0] tbl_waddr = '0;
  ss_entry_t tbl_wdata = '0;
  int checks = 0, failures = 0;
  int avail_limit = 0;
  int got [$], expv [$];
  int lookups = 0, run_cycles = 0, stalls = 0, exp_lookups = 0;
  string pats [$];
  string text;
  hit_t hits [$];

  filtering_engine #(.MIN_LEN(8)) u_dut (.*);

  always_comb begin
    for (int i = 0; i < 4; i++)
      tb_data[31-8*i -: 8] = (int'(tb_addr) + i < text.len()) ? text[int'(tb_addr) + i] : 8'h00;
    tb_avail = int'(tb_addr) + 4 <= avail_limit;
    // text that has not arrived yet reads as a fixed pattern, not as the text
    if (!tb_avail) tb_data = 32'h5a5a5a5a;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_alarm) got.push_back(int'(u_dut.ptr));
    if (ev_check) lookups++;
    if (ev_text_stall) stalls++;
    if (busy && !alarm_valid) run_cycles++;
  end

  // exact-matcher stand-in
  initial forever begin
    @(posedge clk);
    if (alarm_valid && !eme_done) begin
      repeat (3) @(posedge clk);
      eme_done <= 1; eme_resume_ptr <= alarm_pos + 1;
      @(posedge clk);
      eme_done <= 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic string rs(int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(byte'(8'h61 + $urandom_range(0, 9)))};
    return s;
  endfunction

  task automatic model();
    int p = 0;
    expv.delete(); exp_lookups = 0;
    while (p + 8 <= text.len()) begin
      ss_entry_t e;
      logic [31:0] w;
      w = word4(text, p + 4);
      e = tbl_get({text[p+6], text[p+7]});
      exp_lookups++;
      if (e.sflag) p += (e.carry == 0) ? 1 : int'(e.carry);
      else begin
        if (e.carry[sig_bit(w)]) expv.push_back(p);
        p += 1;
      end
    end
  endtask

  task automatic scan(int limit_start, int rate_check);
    got.delete(); lookups = 0; run_cycles = 0; stalls = 0;
    avail_limit = limit_start;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk);
    while (!done) begin
      @(posedge clk);
      if ($urandom_range(0, 1)) avail_limit++;
    end
    checks++;
    if (got.size() != expv.size()) begin failures++; $display("FAIL: %0d alarms, expected %0d", got.size(), expv.size()); end
    for (int i = 0; i < got.size() && i < expv.size(); i++) begin
      checks++;
      if (got[i] != expv[i]) begin failures++; $display("FAIL: alarm %0d at %0d expected %0d", i, got[i], expv[i]); end
    end
    foreach (hits[i]) begin
      checks++;
      if (!(hits[i].pos inside {got})) begin failures++; $display("FAIL: occurrence at %0d missed", hits[i].pos); end
    end
    checks++;
    if (lookups != exp_lookups) begin failures++; $display("FAIL: %0d lookups expected %0d", lookups, exp_lookups); end
    if (rate_check) begin
      checks++;
      if (run_cycles > lookups + 2) begin failures++; $display("FAIL: %0d filter cycles for %0d lookups", run_cycles, lookups); end
    end else begin
      checks++;
      if (stalls == 0) begin failures++; $display("FAIL: no text stall seen"); end
    end
    $display("alarms=%0d lookups=%0d run_cycles=%0d stalls=%0d occurrences=%0d", got.size(), lookups, run_cycles, stalls, hits.size());
  endtask

  initial begin
    while (pats.size() < 20) begin
      string c;
      c = rs($urandom_range(8, 20));
      pats.push_back(c);
    end
    text = "";
    while (text.len() < 1500) text = {text, rs($urandom_range(5, 60)), pats[$urandom_range(0, 19)]};
    build_table(pats, 8);
    ref_matches(text, pats, hits);
    model();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << TBL_IDX_W); i++) begin
      @(posedge clk);
      tbl_we <= 1; tbl_waddr <= TBL_IDX_W'(i); tbl_wdata <= tbl_get(i);
    end
    @(posedge clk); tbl_we <= 0;
    text_len = pos_t'(text.len());
    scan(20, 0);
    scan(1 << 30, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
