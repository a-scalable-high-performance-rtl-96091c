// tb_prefix_addr_ctrl: random sequences of lookup results, resumes and
// loads; the pointer, next pointer, window address and the alarm / shift /
// signature-filter flags are compared with a cycle-level model of the
// filtering rule (shift value, +1 on signature miss, hold on alarm).
module tb_prefix_addr_ctrl;
  import vdp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic load = 0, lookup_valid = 0, sig_hit = 0, resume = 0, advance = 0;
  pos_t load_ptr = '0, resume_ptr = '0, ptr, ptr_next, win_addr_next;
  ss_entry_t entry = '0;
  logic alarm, shifted, sig_filtered;
  int checks = 0, failures = 0;
  int unsigned mptr = 0;

  prefix_addr_ctrl #(.MIN_LEN(8)) u_dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int unsigned exp_next, sh;
      bit ea;
      @(negedge clk);
      load         = (i % 997 == 0);
      load_ptr     = pos_t'($urandom_range(0, 1000));
      lookup_valid = $urandom_range(0, 3) != 0;
      entry        = ss_entry_t'($urandom_range(0, 15));
      sig_hit      = $urandom_range(0, 1);
      resume       = $urandom_range(0, 20) == 0;
      resume_ptr   = pos_t'(mptr + $urandom_range(1, 50));
      advance      = $urandom_range(0, 4) != 0;
      #0.1;
      sh = (entry.carry == 0) ? 1 : entry.carry;
      ea = lookup_valid && !entry.sflag && sig_hit;
      exp_next = mptr;
      if (resume) exp_next = resume_ptr;
      else if (lookup_valid && entry.sflag) exp_next = mptr + sh;
      else if (lookup_valid && !sig_hit) exp_next = mptr + 1;
      checks++;
      if (ptr !== mptr || ptr_next !== exp_next || win_addr_next !== exp_next + 4 || alarm !== ea ||
          shifted !== (lookup_valid && entry.sflag) || sig_filtered !== (lookup_valid && !entry.sflag && !sig_hit)) begin
        failures++;
        $display("FAIL: step %0d ptr %0d/%0d next %0d/%0d alarm %b/%b", i, ptr, mptr, ptr_next, exp_next, alarm, ea);
      end
      if (load) mptr = load_ptr;
      else if (advance) mptr = exp_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
