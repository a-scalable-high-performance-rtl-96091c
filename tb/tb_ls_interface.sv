// tb_ls_interface: three clients issue random reads and writes to a DDR
// model through the interface. Every read must return the data last
// written at its address to the client that asked (and only to it); no
// client may wait while another is granted twice in a row past it, and
// all clients must be served.
module tb_ls_interface;
  import vdp_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [N-1:0] c_req = '0, c_we = '0, c_gnt, c_rvalid;
  logic [MEM_AW-1:0] c_addr [N];
  logic [MEM_DW-1:0] c_wdata [N];
  logic [MEM_DW-1:0] c_rdata;
  logic m_req, m_we, m_ready, m_rvalid;
  logic [MEM_AW-1:0] m_addr;
  logic [MEM_DW-1:0] m_wdata, m_rdata;
  int checks = 0, failures = 0;
  logic [MEM_DW-1:0] model [int];
  logic [MEM_DW-1:0] expect_q [N];
  bit   waiting [N];
  int   served [N];
  int   passed [N];   // grants to others while this one requested

  ls_interface #(.N(N)) u_dut (.*);
  ddr_model #(.LAT_RAND(5), .LAT_SEQ(2)) u_mem (.clk, .rst_n, .hold(1'b0), .req(m_req), .we(m_we),
    .addr(m_addr), .wdata(m_wdata), .ready(m_ready), .rvalid(m_rvalid), .rdata(m_rdata));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial foreach (c_addr[i]) begin c_addr[i] = '0; c_wdata[i] = '0; end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (c_rvalid[i]) begin
        checks++;
        if (!waiting[i] || c_rdata !== expect_q[i]) begin failures++; $display("FAIL: client %0d read data", i); end
        waiting[i] = 0;
      end
      if (c_gnt[i]) begin
        served[i]++;
        passed[i] = 0;
        for (int j = 0; j < N; j++) if (j != i && c_req[j]) begin
          passed[j]++;
          checks++;
          if (passed[j] > N - 1) begin failures++; $display("FAIL: client %0d starved", j); end
        end
        if (c_we[i]) model[int'(c_addr[i])] = c_wdata[i];
        else begin
          expect_q[i] = model.exists(int'(c_addr[i])) ? model[int'(c_addr[i])] : '0;
          waiting[i] = 1;
        end
        c_req[i] <= 0;
      end else if (!c_req[i] && !waiting[i] && $urandom_range(0, 3) == 0) begin
        c_req[i]   <= 1;
        c_we[i]    <= $urandom_range(0, 1);
        c_addr[i]  <= MEM_AW'($urandom_range(0, 15));
        c_wdata[i] <= {$urandom, $urandom, $urandom, $urandom};
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    foreach (served[i]) begin
      checks++;
      if (served[i] < 100) begin failures++; $display("FAIL: client %0d served %0d times", i, served[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
