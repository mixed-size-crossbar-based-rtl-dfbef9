// tb_pea: writes different weights into each crossbar of a small array, checks that a row
// write reaches only the addressed crossbar and that enabled crossbars compute their own
// product while disabled ones stay at zero.
module tb_pea;
  import misca_pkg::*;
  localparam int S = 8;
  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic xb_en [N];
  elem_t xb_in [N][S];
  logic [$clog2(N)-1:0] wr_xb = '0;
  logic [$clog2(S)-1:0] wr_row = '0;
  elem_t wr_data [S];
  elem_t xb_out [N][S];
  logic xb_valid [N];
  elem_t w [N][S][S];
  int checks = 0, failures = 0;

  pea #(.S(S), .N_XB(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xb_en[i]) xb_en[i] = 1'b0;
    foreach (xb_in[i, j]) xb_in[i][j] = '0;
    foreach (wr_data[i]) wr_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int x = 0; x < N; x++)
      for (int r = 0; r < S; r++) begin
        for (int c = 0; c < S; c++) begin
          w[x][r][c] = elem_t'($urandom_range(0, 6) - 3);
          wr_data[c] <= w[x][r][c];
        end
        wr_xb <= x[$clog2(N)-1:0];
        wr_row <= r[$clog2(S)-1:0];
        wr_en <= 1'b1;
        @(posedge clk);
      end
    wr_en <= 1'b0;
    for (int trial = 0; trial < 8; trial++) begin
      for (int x = 0; x < N; x++) begin
        xb_en[x] <= ($urandom_range(0, 1) == 1);
        for (int r = 0; r < S; r++) xb_in[x][r] <= elem_t'($urandom_range(0, 8) - 4);
      end
      @(posedge clk);
      @(negedge clk);
      #1;
      for (int x = 0; x < N; x++)
        for (int c = 0; c < S; c++) begin
          int acc;
          acc = 0;
          if (xb_en[x]) for (int r = 0; r < S; r++) acc += int'(w[x][r][c]) * int'(xb_in[x][r]);
          checks++;
          if (int'(xb_out[x][c]) != acc || xb_valid[x] != xb_en[x]) begin
            failures++;
            $display("FAIL xb %0d col %0d: got %0d exp %0d", x, c, xb_out[x][c], acc);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
