// tb_sum_circuits: random crossbar outputs and routing tables for all three sizes; each lane
// must hold the saturated sum of every used crossbar column mapped onto it, one rising edge
// later, and the encoder must flag the destination the controller chose.
module tb_sum_circuits;
  import misca_pkg::*;
  localparam int N = 3, SL = 8, SM = 4, SS = 2, L = 8;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  dest_e dest = DEST_BUS;
  elem_t out_l [N][SL], out_m [N][SM], out_s [N][SS];
  xb_cfg_t cfg_l [N], cfg_m [N], cfg_s [N];
  elem_t sum [L];
  logic to_pool_valid, to_bus_valid;
  int checks = 0, failures = 0;

  sum_circuits #(.N_XB(N), .SL(SL), .SM(SM), .SS(SS), .LANES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cfg_l[i]) begin cfg_l[i] = '0; cfg_m[i] = '0; cfg_s[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 300; trial++) begin
      int exp [L];
      int mag;
      mag = (trial % 3 == 0) ? 120 : 20;
      foreach (exp[l]) exp[l] = 0;
      for (int x = 0; x < N; x++) begin
        cfg_l[x].en = $urandom_range(0, 1); cfg_l[x].out_off = 2'($urandom_range(0, L/SL - 1));
        cfg_m[x].en = $urandom_range(0, 1); cfg_m[x].out_off = 2'($urandom_range(0, L/SM - 1));
        cfg_s[x].en = $urandom_range(0, 1); cfg_s[x].out_off = 2'($urandom_range(0, L/SS - 1));
        for (int c = 0; c < SL; c++) begin
          out_l[x][c] = elem_t'($urandom_range(0, 2*mag) - mag);
          if (cfg_l[x].en) exp[int'(cfg_l[x].out_off)*SL + c] += int'(out_l[x][c]);
        end
        for (int c = 0; c < SM; c++) begin
          out_m[x][c] = elem_t'($urandom_range(0, 2*mag) - mag);
          if (cfg_m[x].en) exp[int'(cfg_m[x].out_off)*SM + c] += int'(out_m[x][c]);
        end
        for (int c = 0; c < SS; c++) begin
          out_s[x][c] = elem_t'($urandom_range(0, 2*mag) - mag);
          if (cfg_s[x].en) exp[int'(cfg_s[x].out_off)*SS + c] += int'(out_s[x][c]);
        end
      end
      dest = dest_e'($urandom_range(0, 1));
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      checks++;
      if (to_pool_valid != (dest == DEST_POOL) || to_bus_valid != (dest == DEST_BUS)) begin
        failures++; $display("FAIL encoder");
      end
      for (int l = 0; l < L; l++) begin
        int e;
        e = (exp[l] > 127) ? 127 : (exp[l] < -128) ? -128 : exp[l];
        checks++;
        if (int'(sum[l]) != e) begin
          failures++;
          $display("FAIL trial %0d lane %0d got %0d exp %0d", trial, l, sum[l], e);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (to_pool_valid || to_bus_valid) begin failures++; $display("FAIL valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
