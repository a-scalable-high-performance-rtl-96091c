// vdp_top: two-phase virus detection processor.
//
// Scans a text held in external memory for a large set of byte patterns.
// The filtering engine checks the text on chip with the shift-signature
// table and skips safe text several characters at a time; only candidate
// positions that pass both filter levels are verified by the exact-matching
// engine, which walks a compact trie in external memory. Matches are queued
// and written to the output area of external memory.
//
//   text pump --> text buffer --> filtering engine (shift-signature table)
//                     |                 | alarm / resume pointer
//                     +----------> exact-matching engine --> result queue
//                                        | trie nodes             |
//                                  trie cache -> prefetch         |
//                                        |                        |
//   external memory <-- load/store interface (trie, text, results)
//
// Use: load the shift-signature table through tbl_* and place text, trie
// table and output area in external memory; set the base addresses and
// text_len, pulse start. done rises when the whole text has been scanned
// and every result is written, and stays high until the next start.
// skip_en, prefetch_en and cache_en switch the three memory-gap
// enhancements on or off. stats counts the events of the current scan.
//
// The block structure, the two-phase flow and the enhancements follow the
// source design; the memory map, handshakes and sizes of the buffers,
// cache and queue are this design's own (see each block).
// rst_n also disables the assertions inside ls_interface and trie_prefetch; a
// linter may report it as used synchronously and asynchronously, which is
// intended.
module vdp_top
  import vdp_pkg::*;
#(
  parameter int unsigned MIN_LEN     = 8,
  parameter int unsigned TB_LINES    = 128,
  parameter int unsigned ROOT_BITS   = 16,
  parameter int unsigned CACHE_LINES = 64,
  parameter int unsigned RQ_DEPTH    = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,
  input  logic [MEM_AW-1:0]    text_base,
  input  pos_t                 text_len,
  input  logic [MEM_AW-1:0]    trie_base,
  input  logic [MEM_AW-1:0]    result_base,
  input  logic                 skip_en,
  input  logic                 prefetch_en,
  input  logic                 cache_en,
  output logic                 busy,
  output logic                 done,
  output pos_t                 result_count,
  output vdp_stats_t           stats,
  // shift-signature table load
  input  logic                 tbl_we,
  input  logic [TBL_IDX_W-1:0] tbl_waddr,
  input  ss_entry_t            tbl_wdata,
  // matched pattern (also written to the output area)
  output logic                 match_valid,
  output logic [PID_W-1:0]     match_pid,
  output pos_t                 match_pos,
  // external memory
  output logic                 m_req,
  output logic                 m_we,
  output logic [MEM_AW-1:0]    m_addr,
  output logic [MEM_DW-1:0]    m_wdata,
  input  logic                 m_ready,
  input  logic                 m_rvalid,
  input  logic [MEM_DW-1:0]    m_rdata
);

  localparam int unsigned NC = 3;  // LS clients: 0 trie, 1 text pump, 2 results

  // ---------------- text path ----------------
  pos_t              fe_tb_addr, eme_tb_addr, retire_pos;
  logic [31:0]       fe_tb_data, eme_tb_data;
  logic              fe_tb_avail, eme_tb_avail;
  logic              tp_wr, tp_eof, tb_space;
  logic [MEM_DW-1:0] tp_line;
  logic [7:0]        tp_inflight;

  // ---------------- engines ----------------
  logic              fe_alarm, fe_busy, fe_done, eme_done, eme_busy;
  pos_t              fe_alarm_pos, eme_resume, fe_ptr, eme_ptr;
  logic              r_valid, r_ready;
  logic [PID_W-1:0]  r_pid;
  pos_t              r_pos;
  logic              rq_empty;

  // ---------------- trie path ----------------
  logic              n_req, n_valid, c_dreq, p_valid;
  logic [MEM_AW-1:0] n_addr, c_daddr;
  logic [MEM_DW-1:0] n_data, p_data;

  // ---------------- load/store clients ----------------
  logic [NC-1:0]     ls_req, ls_we, ls_gnt, ls_rvalid;
  logic [MEM_AW-1:0] ls_addr  [NC];
  logic [MEM_DW-1:0] ls_wdata [NC];
  logic [MEM_DW-1:0] ls_rdata;

  // event pulses
  logic ev_check, ev_shift, ev_sigf, ev_alarm, ev_tstall;
  logic ev_ncmp, ev_sib, ev_match, ev_skip, ev_jump, ev_mstall;
  logic [SKIP_W-1:0] skip_bytes;
  logic ev_dread, ev_pread, ev_pfhit, ev_chit, ev_rqfull;

  logic running;

  assign retire_pos = eme_busy ? eme_ptr : fe_ptr;

  text_pump u_pump (
    .clk(clk), .rst_n(rst_n), .start(start),
    .text_base(text_base), .text_len(text_len),
    .req(ls_req[1]), .addr(ls_addr[1]), .gnt(ls_gnt[1]),
    .rvalid(ls_rvalid[1]), .rdata(ls_rdata),
    .space(tb_space), .wr_en(tp_wr), .wr_line(tp_line),
    .inflight(tp_inflight), .eof(tp_eof)
  );
  assign ls_we[1]    = 1'b0;
  assign ls_wdata[1] = '0;

  text_buffer #(.LINES(TB_LINES)) u_tbuf (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .wr_en(tp_wr), .wr_line(tp_line), .eof(tp_eof),
    .inflight(tp_inflight), .space(tb_space), .retire_pos(retire_pos),
    .a_addr(fe_tb_addr), .a_data(fe_tb_data), .a_avail(fe_tb_avail),
    .b_addr(eme_tb_addr), .b_data(eme_tb_data), .b_avail(eme_tb_avail)
  );

  filtering_engine #(.MIN_LEN(MIN_LEN)) u_fe (
    .clk(clk), .rst_n(rst_n), .start(start), .text_len(text_len),
    .tb_addr(fe_tb_addr), .tb_data(fe_tb_data), .tb_avail(fe_tb_avail),
    .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .alarm_valid(fe_alarm), .alarm_pos(fe_alarm_pos),
    .eme_done(eme_done), .eme_resume_ptr(eme_resume),
    .ptr(fe_ptr), .busy(fe_busy), .done(fe_done),
    .ev_check(ev_check), .ev_shift(ev_shift), .ev_sig_filtered(ev_sigf),
    .ev_alarm(ev_alarm), .ev_text_stall(ev_tstall)
  );

  exact_matching_engine #(.ROOT_BITS(ROOT_BITS)) u_eme (
    .clk(clk), .rst_n(rst_n), .skip_en(skip_en), .text_len(text_len),
    .trie_base(trie_base),
    .alarm_valid(fe_alarm && !eme_done), .alarm_pos(fe_alarm_pos),
    .done(eme_done), .resume_ptr(eme_resume),
    .tb_addr(eme_tb_addr), .tb_data(eme_tb_data), .tb_avail(eme_tb_avail),
    .n_req(n_req), .n_addr(n_addr), .n_valid(n_valid), .n_data(trie_node_t'(n_data)),
    .r_valid(r_valid), .r_pid(r_pid), .r_pos(r_pos), .r_ready(r_ready),
    .busy(eme_busy), .cur_ptr(eme_ptr),
    .ev_node_cmp(ev_ncmp), .ev_sibling(ev_sib), .ev_match(ev_match),
    .ev_skip(ev_skip), .skip_bytes(skip_bytes), .ev_jump(ev_jump),
    .ev_mem_stall(ev_mstall)
  );

  trie_cache #(.LINES(CACHE_LINES)) u_cache (
    .clk(clk), .rst_n(rst_n), .en(cache_en), .flush(start),
    .req(n_req), .addr(n_addr), .resp_valid(n_valid), .resp_data(n_data),
    .d_req(c_dreq), .d_addr(c_daddr), .d_resp_valid(p_valid), .d_resp_data(p_data),
    .ev_hit(ev_chit)
  );

  trie_prefetch u_pf (
    .clk(clk), .rst_n(rst_n), .en(prefetch_en), .flush(start),
    .req(c_dreq), .addr(c_daddr), .resp_valid(p_valid), .resp_data(p_data),
    .d_req(ls_req[0]), .d_addr(ls_addr[0]), .d_gnt(ls_gnt[0]),
    .d_rvalid(ls_rvalid[0]), .d_rdata(ls_rdata),
    .ev_demand_read(ev_dread), .ev_prefetch_read(ev_pread), .ev_pf_hit(ev_pfhit)
  );
  assign ls_we[0]    = 1'b0;
  assign ls_wdata[0] = '0;

  result_queue #(.DEPTH(RQ_DEPTH)) u_rq (
    .clk(clk), .rst_n(rst_n), .start(start), .result_base(result_base),
    .push(r_valid), .push_pid(r_pid), .push_pos(r_pos), .push_ready(r_ready),
    .req(ls_req[2]), .addr(ls_addr[2]), .wdata(ls_wdata[2]), .gnt(ls_gnt[2]),
    .count(result_count), .empty(rq_empty), .ev_full(ev_rqfull)
  );
  assign ls_we[2] = 1'b1;

  ls_interface #(.N(NC)) u_ls (
    .clk(clk), .rst_n(rst_n),
    .c_req(ls_req), .c_we(ls_we), .c_addr(ls_addr), .c_wdata(ls_wdata),
    .c_gnt(ls_gnt), .c_rvalid(ls_rvalid), .c_rdata(ls_rdata),
    .m_req(m_req), .m_we(m_we), .m_addr(m_addr), .m_wdata(m_wdata),
    .m_ready(m_ready), .m_rvalid(m_rvalid), .m_rdata(m_rdata)
  );

  // ---------------- run state and statistics ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      stats   <= '0;
    end else if (start) begin
      running <= 1'b1;
      done    <= 1'b0;
      stats   <= '0;
    end else begin
      if (running && fe_done && !eme_busy && rq_empty) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
      if (running) begin
        stats.cycles <= stats.cycles + 1;
        if (ls_gnt[1]) stats.text_reads    <= stats.text_reads + 1;
        if (ls_gnt[2]) stats.result_writes <= stats.result_writes + 1;
      end
      if (ev_check)  stats.fe_checks          <= stats.fe_checks + 1;
      if (ev_shift)  stats.fe_shifts          <= stats.fe_shifts + 1;
      if (ev_sigf)   stats.fe_sig_filtered    <= stats.fe_sig_filtered + 1;
      if (ev_alarm)  stats.alarms             <= stats.alarms + 1;
      if (ev_tstall) stats.fe_text_stalls     <= stats.fe_text_stalls + 1;
      if (ev_ncmp)   stats.node_cmps          <= stats.node_cmps + 1;
      if (ev_sib)    stats.sibling_steps      <= stats.sibling_steps + 1;
      if (ev_match)  stats.pattern_hits       <= stats.pattern_hits + 1;
      if (ev_skip)   stats.skip_events        <= stats.skip_events + 1;
      if (ev_skip)   stats.skipped_bytes      <= stats.skipped_bytes + 32'(skip_bytes);
      if (ev_jump)   stats.jump_events        <= stats.jump_events + 1;
      if (ev_mstall) stats.mem_stall_cycles   <= stats.mem_stall_cycles + 1;
      if (ev_dread)  stats.trie_demand_reads  <= stats.trie_demand_reads + 1;
      if (ev_pread)  stats.trie_prefetch_reads<= stats.trie_prefetch_reads + 1;
      if (ev_pfhit)  stats.prefetch_hits      <= stats.prefetch_hits + 1;
      if (ev_chit)   stats.cache_hits         <= stats.cache_hits + 1;
      if (ev_rqfull) stats.result_full_stalls <= stats.result_full_stalls + 1;
    end
  end

  assign busy        = running;
  assign match_valid = r_valid && r_ready;
  assign match_pid   = r_pid;
  assign match_pos   = r_pos;

endmodule
