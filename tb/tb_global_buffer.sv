// tb_global_buffer: random writes then reads against a reference memory; read data and
// rvalid must arrive exactly one cycle after the request.
module tb_global_buffer;
  import misca_pkg::*;
  localparam int L = 8, AW = 5;

  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, we = 1'b0, rvalid;
  logic [AW-1:0] addr = '0;
  elem_t wdata [L], rdata [L];
  elem_t ref_mem [2**AW][L];
  bit written [2**AW];
  int checks = 0, failures = 0;

  global_buffer #(.LANES(L), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wdata[i]) wdata[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2**AW; i++) begin
      req <= 1'b1; we <= 1'b1; addr <= AW'(i);
      for (int l = 0; l < L; l++) begin
        ref_mem[i][l] = elem_t'($urandom);
        wdata[l] <= ref_mem[i][l];
      end
      @(posedge clk);
    end
    for (int k = 0; k < 300; k++) begin
      int a;
      a = $urandom_range(0, 2**AW - 1);
      if ($urandom_range(0, 2) == 0) begin
        req <= 1'b1; we <= 1'b1; addr <= AW'(a);
        for (int l = 0; l < L; l++) begin
          ref_mem[a][l] = elem_t'($urandom);
          wdata[l] <= ref_mem[a][l];
        end
        @(posedge clk); #1;
        checks++;
        if (rvalid) begin failures++; $display("FAIL rvalid on write"); end
      end else begin
        req <= 1'b1; we <= 1'b0; addr <= AW'(a);
        @(posedge clk);
        req <= 1'b0;
        #1;
        checks++;
        if (!rvalid) begin failures++; $display("FAIL rvalid missing"); end
        for (int l = 0; l < L; l++) begin
          checks++;
          if (rdata[l] !== ref_mem[a][l]) begin
            failures++; $display("FAIL addr %0d lane %0d", a, l);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
