// tb_text_pump: the pump reads a 1000-byte text from the DDR model; the
// test grants space irregularly and checks that the lines arrive in order
// with the right data, that no line is requested without space, that
// exactly ceil(1000/16) = 63 lines are read from consecutive addresses and
// that eof rises at the end. Then a second start with a new length.
module tb_text_pump;
  import vdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, req, gnt, rvalid, space = 0, wr_en, eof, m_ready;
  logic [MEM_AW-1:0] text_base = 24'h1234, addr;
  pos_t text_len = 1000;
  logic [MEM_DW-1:0] rdata, wr_line;
  logic [7:0] inflight;
  int checks = 0, failures = 0, lines = 0, reqs = 0;

  text_pump u_dut (.clk, .rst_n, .start, .text_base, .text_len, .req, .addr, .gnt,
                   .rvalid, .rdata, .space, .wr_en, .wr_line, .inflight, .eof);
  ddr_model u_mem (.clk, .rst_n, .hold(1'b0), .req, .we(1'b0), .addr, .wdata('0),
                   .ready(m_ready), .rvalid, .rdata);
  assign gnt = m_ready;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (req && !space) begin failures++; $display("FAIL: request without space"); end
    if (req && gnt) begin
      checks++;
      if (addr !== text_base + MEM_AW'(reqs)) begin failures++; $display("FAIL: address %h", addr); end
      reqs++;
    end
    if (wr_en && rst_n) begin
      checks++;
      if (wr_line !== {8'(lines), 88'h0, 32'hC0DE0000 | 32'(lines)}) begin failures++; $display("FAIL: line %0d data %h at %0t", lines, wr_line, $time); end
      lines++;
    end
    space <= $urandom_range(0, 2) != 0;
  end

  task automatic run(int len);
    int exp = (len + 15) / 16;
    lines = 0; reqs = 0;
    text_len = pos_t'(len);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk);
    wait (eof);
    repeat (50) @(posedge clk);
    checks++;
    if (lines != exp || reqs != exp) begin failures++; $display("FAIL: %0d lines %0d reqs, expected %0d", lines, reqs, exp); end
  endtask

  initial begin
    for (int i = 0; i < 100; i++) u_mem.poke(text_base + MEM_AW'(i), {8'(i), 88'h0, 32'hC0DE0000 | 32'(i)});
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1000);
    run(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
