// filtering_engine: first phase of the virus detection processor.
//
// Scans the text with the shift-signature algorithm. For the pattern pointer
// p it reads the 4-character search window at p + MIN_LEN - 4 from the text
// buffer, indexes the shift-signature table with the last two characters (the
// bad character) and, one cycle later, acts on the 4-bit entry:
//   S-flag = 1 : p += shift value (carry)
//   S-flag = 0 : hash the window; signature bit clear -> p += 1,
//                signature bit set -> alarm at candidate position p.
// On an alarm the engine waits until the exact-matching engine returns a new
// pattern pointer, then carries on. The scan ends when p + MIN_LEN passes the
// end of the text.
//
// The flow, the table format and the two-level filter follow the source
// design. Own choices: MIN_LEN (shortest pattern length) defaults to 8, the
// length of the worked example, giving the 3-bit carry its full shift range
// of 7; the next table address is formed combinationally from the lookup
// result so that one window is checked every clock cycle while the text is
// in the buffer.
//
// Interface: start (pulse) begins a scan of text_len bytes from position 0;
// done rises when the scan ends and stays high until the next start. The
// table is written through tbl_we/tbl_waddr/tbl_wdata while idle.
module filtering_engine
  import vdp_pkg::*;
#(
  parameter int unsigned MIN_LEN = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  pos_t                 text_len,
  // text buffer read port (combinational)
  output pos_t                 tb_addr,
  input  logic [8*WIN_CHARS-1:0] tb_data,
  input  logic                 tb_avail,
  // table load port
  input  logic                 tbl_we,
  input  logic [TBL_IDX_W-1:0] tbl_waddr,
  input  ss_entry_t            tbl_wdata,
  // to / from the exact-matching engine
  output logic                 alarm_valid,
  output pos_t                 alarm_pos,
  input  logic                 eme_done,
  input  pos_t                 eme_resume_ptr,
  // status
  output pos_t                 ptr,
  output logic                 busy,
  output logic                 done,
  // event pulses for the statistics counters
  output logic                 ev_check,
  output logic                 ev_shift,
  output logic                 ev_sig_filtered,
  output logic                 ev_alarm,
  output logic                 ev_text_stall
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_ALARM, S_DONE} state_e;
  state_e state;

  logic                   pend;
  logic [8*WIN_CHARS-1:0] win_q;
  ss_entry_t              entry;
  logic                   sig_hit;
  logic                   alarm, shifted, sig_filtered;
  logic                   advance, resume, issue, at_end;
  pos_t                   ptr_next, win_addr_next;

  shift_sig_table u_table (
    .clk    (clk),
    .rd_en  (issue),
    .rd_addr(tb_data[TBL_IDX_W-1:0]),
    .rd_data(entry),
    .wr_en  (tbl_we),
    .wr_addr(tbl_waddr),
    .wr_data(tbl_wdata)
  );

  signature_check u_sig (
    .window   (win_q),
    .signature(entry.carry),
    .text_sig (),
    .hit      (sig_hit)
  );

  prefix_addr_ctrl #(.MIN_LEN(MIN_LEN)) u_pac (
    .clk          (clk),
    .rst_n        (rst_n),
    .load         (start),
    .load_ptr     ('0),
    .lookup_valid (pend && state == S_RUN),
    .entry        (entry),
    .sig_hit      (sig_hit),
    .resume       (resume),
    .resume_ptr   (eme_resume_ptr),
    .advance      (advance),
    .ptr          (ptr),
    .ptr_next     (ptr_next),
    .win_addr_next(win_addr_next),
    .alarm        (alarm),
    .shifted      (shifted),
    .sig_filtered (sig_filtered)
  );

  always_comb begin
    resume  = (state == S_ALARM) && eme_done;
    advance = ((state == S_RUN) && !alarm) || resume;
    at_end  = (33'(ptr_next) + 33'(MIN_LEN)) > 33'(text_len);
    issue   = advance && !at_end && tb_avail;
    tb_addr = win_addr_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pend  <= 1'b0;
      win_q <= '0;
    end else begin
      if (issue) win_q <= tb_data;
      pend <= issue;
      if (start) begin
        state <= S_RUN;
        pend  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE:  ;
          S_RUN:   if (alarm) state <= S_ALARM;
                   else if (at_end) state <= S_DONE;
          S_ALARM: if (resume && at_end) state <= S_DONE;
                   else if (resume) state <= S_RUN;
          S_DONE:  ;
        endcase
      end
    end
  end

  assign alarm_valid     = (state == S_ALARM);
  assign alarm_pos       = ptr;
  assign busy            = (state == S_RUN) || (state == S_ALARM);
  assign done            = (state == S_DONE);
  assign ev_check        = pend && (state == S_RUN);
  assign ev_shift        = shifted && (state == S_RUN);
  assign ev_sig_filtered = sig_filtered && (state == S_RUN);
  assign ev_alarm        = alarm && (state == S_RUN);
  assign ev_text_stall   = advance && !at_end && !tb_avail;

endmodule
