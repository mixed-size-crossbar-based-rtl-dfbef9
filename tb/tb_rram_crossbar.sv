// tb_rram_crossbar: checks the crossbar model's matrix-vector product, ADC shift and
// saturation, row writes, the falling-edge output timing and the idle (disabled) output.
module tb_rram_crossbar;
  import misca_pkg::*;
  localparam int S = 16;
  localparam int SH = 2;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, wr_en = 1'b0, out_valid;
  logic [$clog2(S)-1:0] wr_row = '0;
  elem_t vin [S], wr_data [S], out [S];
  elem_t w [S][S];
  int checks = 0, failures = 0;

  rram_crossbar #(.S(S), .ADC_SHIFT(SH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input string what);
    for (int c = 0; c < S; c++) begin
      int acc;
      elem_t exp;
      acc = 0;
      for (int r = 0; r < S; r++) acc += int'(w[r][c]) * int'(vin[r]);
      acc = acc >>> SH;
      exp = (acc > 127) ? 8'sd127 : (acc < -128) ? -8'sd128 : elem_t'(acc);
      checks++;
      if (out[c] !== exp) begin
        failures++;
        $display("FAIL %s col %0d: got %0d exp %0d", what, c, out[c], exp);
      end
    end
  endtask

  initial begin
    foreach (vin[i]) vin[i] = '0;
    foreach (wr_data[i]) wr_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 6; trial++) begin
      int mag;
      mag = (trial < 3) ? 8 : 128;   // later trials saturate
      for (int r = 0; r < S; r++) begin
        for (int c = 0; c < S; c++) begin
          w[r][c] = elem_t'($urandom_range(0, 2*mag-1) - mag);
          wr_data[c] <= w[r][c];
        end
        wr_row <= r[$clog2(S)-1:0];
        wr_en <= 1'b1;
        @(posedge clk);
      end
      wr_en <= 1'b0;
      for (int r = 0; r < S; r++) vin[r] <= elem_t'($urandom_range(0, 2*mag-1) - mag);
      en <= 1'b1;
      @(posedge clk);
      // just after the rising edge: the previous result is still shown
      #1;
      @(negedge clk);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid not set at falling edge"); end
      check_out("product");
      en <= 1'b0;
      @(posedge clk);
      @(negedge clk);
      #1;
      checks++;
      if (out_valid || out[0] !== 0) begin failures++; $display("FAIL idle crossbar output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
