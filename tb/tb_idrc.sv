// tb_idrc: pushes random blocks and compares the queue with a reference made of the last
// vec_len elements of the stream since the row started. Checks the fill-up delay, that every
// push after fill-up yields a vector in the next cycle (one vector per cycle), the flush at the
// row end, vectors only at the end of multi-push window steps, and that elements past
// vec_len read zero.
module tb_idrc;
  import misca_pkg::*;
  localparam int VL = 16;
  localparam int PW = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, push = 1'b0;
  logic [14:0] vec_len;
  logic [9:0] push_len;
  logic [3:0] step_pushes;
  logic [15:0] row_pushes;
  elem_t push_data [PW];
  elem_t vec [VL];
  logic vec_valid, row_end;
  int checks = 0, failures = 0, flushes = 0;

  idrc #(.VEC_LEN(VL), .PUSH_W(PW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int vl, input int pl, input int rp, input int rows, input bit gaps,
                    input int step);
    elem_t stream [$];
    vec_len = 15'(vl); push_len = 10'(pl); row_pushes = 16'(rp); step_pushes = 4'(step);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int row = 0; row < rows; row++) begin
      stream.delete();
      for (int p = 0; p < rp; p++) begin
        if (gaps && $urandom_range(0, 2) == 0) begin
          push <= 1'b0;
          @(posedge clk); #1;
          checks++;
          if (vec_valid) begin failures++; $display("FAIL vector without push"); end
        end
        for (int i = 0; i < PW; i++) push_data[i] <= elem_t'($urandom);
        push <= 1'b1;
        @(posedge clk);
        for (int i = 0; i < pl; i++) stream.push_back(push_data[i]);
        push <= 1'b0;
        #1;
        checks++;
        if (vec_valid != (stream.size() >= vl && (p + 1) % step == 0)) begin
          failures++;
          $display("FAIL valid row %0d push %0d: %0d", row, p, vec_valid);
        end
        if (vec_valid)
          for (int i = 0; i < VL; i++) begin
            elem_t exp;
            exp = (i < vl) ? stream[stream.size() - vl + i] : elem_t'(0);
            checks++;
            if (vec[i] !== exp) begin
              failures++;
              $display("FAIL row %0d push %0d elem %0d got %0d exp %0d", row, p, i, vec[i], exp);
            end
          end
        checks++;
        if (row_end != (p == rp - 1)) begin failures++; $display("FAIL row_end"); end
        if (row_end) flushes++;
        if (!gaps) push <= 1'b1;
      end
    end
    push <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    foreach (push_data[i]) push_data[i] = '0;
    vec_len = 15'd4; push_len = 10'd1; row_pushes = 16'd1; step_pushes = 4'd1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(10, 3, 6, 3, 1'b0, 1);   // vector of 10, blocks of 3: valid from the 4th push
    run(12, 4, 5, 2, 1'b1, 1);   // pushes with gaps
    run(8, 2, 7, 2, 1'b0, 1);
    run(12, 2, 8, 2, 1'b0, 2);   // a window step takes two pushes
    checks++;
    if (flushes != 9) begin failures++; $display("FAIL flush count %0d", flushes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
