// tb_pool_relu: all four modes on random data against a reference: pass, ReLU per lane,
// max over windows of 4 (never below zero) and the floor of the window mean; one cycle latency.
module tb_pool_relu;
  import misca_pkg::*;
  localparam int L = 16, G = 4, W = 4;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  pool_mode_e mode = POOL_NONE;
  elem_t in [L], out [L];
  int checks = 0, failures = 0;

  pool_relu #(.LANES(L), .GROUPS(G), .WIN(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (in[i]) in[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 400; trial++) begin
      int exp [L];
      foreach (in[i]) in[i] = elem_t'($urandom);
      mode = pool_mode_e'(trial % 4);
      for (int l = 0; l < L; l++) begin
        unique case (mode)
          POOL_NONE: exp[l] = int'(in[l]);
          POOL_RELU: exp[l] = (in[l] > 0) ? int'(in[l]) : 0;
          POOL_MAX: begin
            exp[l] = 0;
            if (l < G) for (int w = 0; w < W; w++) if (int'(in[l*W+w]) > exp[l]) exp[l] = int'(in[l*W+w]);
          end
          POOL_AVG: begin
            int s;
            s = 0;
            if (l < G) for (int w = 0; w < W; w++) s += int'(in[l*W+w]);
            exp[l] = (l < G) ? (s >>> 2) : 0;
          end
        endcase
      end
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid"); end
      for (int l = 0; l < L; l++) begin
        checks++;
        if (int'(out[l]) != exp[l]) begin
          failures++;
          $display("FAIL mode %0d lane %0d got %0d exp %0d", mode, l, out[l], exp[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
