// tb_result_queue: pushes 100 records in bursts while the write grant is
// given irregularly; checks that push_ready drops exactly when 16 records
// wait, that records are written oldest first to result_base + n with the
// right {pid, pos}, and that count and empty track the writes.
module tb_result_queue;
  import vdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, push = 0, push_ready, req, gnt = 0, empty, ev_full;
  logic [MEM_AW-1:0] result_base = 24'h20_0000, addr;
  logic [PID_W-1:0] push_pid = '0;
  pos_t push_pos = '0, count;
  logic [MEM_DW-1:0] wdata;
  int checks = 0, failures = 0, pushed = 0, written = 0, fulls = 0;

  result_queue #(.DEPTH(16)) u_dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (push_ready !== ((pushed - written) < 16)) begin failures++; $display("FAIL: push_ready %b with %0d queued", push_ready, pushed - written); end
    if (empty !== (pushed == written) || count !== pos_t'(written)) begin failures++; $display("FAIL: empty/count"); end
    if (!push_ready) fulls++;
    if (req && gnt) begin
      result_t r;
      r = result_t'(wdata);
      checks++;
      if (addr !== result_base + MEM_AW'(written) || r.pid !== PID_W'(written * 7) || r.pos !== pos_t'(written * 13 + 5)) begin
        failures++; $display("FAIL: write %0d addr %h pid %0d pos %0d", written, addr, r.pid, r.pos);
      end
      written++;
    end
    if (push && push_ready) pushed++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (pushed < 100 || written < 100) begin
      @(negedge clk);
      gnt      = (pushed > 40) ? ($urandom_range(0, 1) == 0) : ($urandom_range(0, 9) == 0);
      push     = (pushed < 100) && ($urandom_range(0, 2) != 0);
      push_pid = PID_W'(pushed * 7);
      push_pos = pos_t'(pushed * 13 + 5);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
