// tb_shared_bus: masters raise random requests and hold them until granted. Checks at most
// one grant per cycle, only to a requester, round-robin order, forwarding of the granted
// request to the buffer side, no starvation, and read data returned to its owner only.
module tb_shared_bus;
  import misca_pkg::*;
  localparam int N = 4, L = 4, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic m_req [N], m_we [N], m_gnt [N], m_rvalid [N];
  logic [AW-1:0] m_addr [N];
  elem_t m_wdata [N][L], m_rdata [L];
  logic s_req, s_we, s_rvalid;
  logic [AW-1:0] s_addr;
  elem_t s_wdata [L], s_rdata [L];
  int checks = 0, failures = 0, grants [N], last = N - 1, prev_rd = -1, prev_g = -1;

  shared_bus #(.N_M(N), .LANES(L), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  // buffer side: echo the address as read data
  always_ff @(posedge clk) begin
    s_rvalid <= s_req && !s_we;
    for (int l = 0; l < L; l++) s_rdata[l] <= elem_t'(s_addr) + elem_t'(l);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_req[i]) begin
      m_req[i] = 1'b0; m_we[i] = 1'b0; m_addr[i] = '0; grants[i] = 0;
      foreach (m_wdata[i][l]) m_wdata[i][l] = '0;
    end
    s_rvalid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int n_gnt, g, exp_g;
      #1;
      if (prev_g >= 0) m_req[prev_g] = 1'b0;
      // requests for this cycle: keep ungranted ones, add new ones at random
      for (int m = 0; m < N; m++)
        if (!m_req[m] && $urandom_range(0, 3) == 0) begin
          m_req[m] = 1'b1;
          m_we[m] = $urandom_range(0, 1);
          m_addr[m] = AW'($urandom);
          for (int l = 0; l < L; l++) m_wdata[m][l] = elem_t'($urandom);
        end
      #1;
      // read data of the previous cycle's grant
      for (int m = 0; m < N; m++) begin
        checks++;
        if (m_rvalid[m] != (prev_rd == m)) begin failures++; $display("FAIL rvalid owner"); end
      end
      n_gnt = 0; g = -1; exp_g = -1;
      for (int k = 1; k <= N; k++)
        if (exp_g < 0 && m_req[(last + k) % N]) exp_g = (last + k) % N;
      for (int m = 0; m < N; m++) if (m_gnt[m]) begin n_gnt++; g = m; end
      checks++;
      if (n_gnt > 1 || g != exp_g) begin
        failures++; $display("FAIL grant %0d expected %0d", g, exp_g);
      end
      prev_rd = -1;
      if (g >= 0) begin
        checks++;
        if (!s_req || s_we != m_we[g] || s_addr != m_addr[g] || s_wdata[0] !== m_wdata[g][0]) begin
          failures++; $display("FAIL forwarding");
        end
        if (!m_we[g]) prev_rd = g;
        grants[g]++;
        last = g;
      end
      prev_g = g;
      @(posedge clk);
    end
    for (int m = 0; m < N; m++) begin
      checks++;
      if (grants[m] < 100) begin failures++; $display("FAIL master %0d starved", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
