// tb_text_buffer: streams a 6 kB random text through the 2 kB buffer while
// the retire position follows behind; every random 4-byte read on both
// ports is checked against the text when available, availability is
// checked against the written length, and `space` must never allow the
// writer to overwrite a line at or above the retire position.
module tb_text_buffer;
  import vdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic clear = 0, wr_en = 0, eof = 0, space, a_avail, b_avail;
  logic [MEM_DW-1:0] wr_line = '0;
  logic [7:0] inflight = '0;
  pos_t retire_pos = '0, a_addr = '0, b_addr = '0;
  logic [31:0] a_data, b_data;
  int checks = 0, failures = 0, avail_seen = 0, full_seen = 0;
  byte text [6144];
  int written = 0;

  text_buffer #(.LINES(128)) u_dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] ref4(int a);
    return {text[a], text[a+1], text[a+2], text[a+3]};
  endfunction

  initial begin
    foreach (text[i]) text[i] = byte'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (written < 384 || retire_pos < 6000) begin
      @(negedge clk);
      // check reads on the current state
      a_addr = pos_t'(retire_pos + $urandom_range(0, 2000));
      b_addr = pos_t'(retire_pos + $urandom_range(0, 200));
      #0.1;
      checks++;
      if (a_avail !== (a_addr + 4 <= written * 16) && !eof) begin
        failures++; $display("FAIL: avail a %0d written %0d", a_addr, written);
      end
      if (a_avail && a_addr + 4 <= 6144) begin
        checks++;
        if (a_data !== ref4(int'(a_addr))) begin failures++; $display("FAIL: port a @%0d %h vs %h", a_addr, a_data, ref4(int'(a_addr))); end
        avail_seen++;
      end
      if (b_avail && b_addr + 4 <= 6144) begin
        checks++;
        if (b_data !== ref4(int'(b_addr))) begin failures++; $display("FAIL: port b @%0d", b_addr); end
      end
      // space rule: the next line must not reach retire line + 128
      checks++;
      if (space !== (written < (retire_pos / 16) + 128)) begin
        failures++; $display("FAIL: space %b written %0d retire %0d", space, written, retire_pos);
      end
      // write a line sometimes, move retire sometimes
      if (space && written < 384 && $urandom_range(0, 1)) begin
        for (int b = 0; b < 16; b++) wr_line[8*b +: 8] = text[written*16 + b];
        wr_en = 1;
      end else wr_en = 0;
      @(posedge clk); #0.1;
      if (wr_en) written++;
      wr_en = 0;
      // the reader lets the buffer run full before it moves on
      if (!space) full_seen++;
      if (retire_pos + 64 < written * 16 && (written >= retire_pos / 16 + 126 || eof) &&
          $urandom_range(0, 2) == 0) retire_pos = retire_pos + pos_t'($urandom_range(1, 40));
      if (written == 384) eof = 1;
    end
    checks++;
    if (avail_seen < 100) begin failures++; $display("FAIL: too few reads"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
