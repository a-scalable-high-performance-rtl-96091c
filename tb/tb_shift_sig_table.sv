// tb_shift_sig_table: writes random entries to random table addresses and
// reads them back, checking the one-cycle read latency and that the output
// holds while rd_en is low.
module tb_shift_sig_table;
  import vdp_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  logic rd_en = 0, wr_en = 0;
  logic [TBL_IDX_W-1:0] rd_addr = '0, wr_addr = '0;
  ss_entry_t rd_data, wr_data = '0;
  int checks = 0, failures = 0;
  ss_entry_t model [int];
  int addrs [$];

  shift_sig_table u_dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int a;
      ss_entry_t d;
      a = $urandom_range(0, 65535);
      d = ss_entry_t'($urandom_range(0, 15));
      @(posedge clk); wr_en <= 1; wr_addr <= TBL_IDX_W'(a); wr_data <= d;
      model[a] = d; addrs.push_back(a);
    end
    @(posedge clk); wr_en <= 0;
    foreach (addrs[i]) begin
      @(posedge clk); rd_en <= 1; rd_addr <= TBL_IDX_W'(addrs[i]);
      @(posedge clk); rd_en <= 0;
      #0.5;
      checks++;
      if (rd_data !== model[addrs[i]]) begin
        failures++; $display("FAIL: addr %0h read %0h expected %0h", addrs[i], rd_data, model[addrs[i]]);
      end
      rd_addr <= rd_addr + 1'b1;          // must not change the output
      @(posedge clk); #0.5;
      checks++;
      if (rd_data !== model[addrs[i]]) begin failures++; $display("FAIL: output not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
