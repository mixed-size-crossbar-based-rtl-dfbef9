// tb_xb_sel: random routing tables; every crossbar must get the slice its entry names, or
// zeros (and no enable) when unused or when no vector is valid.
module tb_xb_sel;
  import misca_pkg::*;
  localparam int S = 4;
  localparam int N = 6;
  localparam int VL = 16;

  elem_t vec [VL];
  logic vec_valid;
  xb_cfg_t cfg [N];
  elem_t xb_in [N][S];
  logic xb_en [N];
  int checks = 0, failures = 0;

  xb_sel #(.S(S), .N_XB(N), .VEC_LEN(VL)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 200; trial++) begin
      foreach (vec[i]) vec[i] = elem_t'($urandom);
      vec_valid = ($urandom_range(0, 7) != 0);
      foreach (cfg[x]) begin
        cfg[x].en = ($urandom_range(0, 3) != 0);
        cfg[x].in_seg = 7'($urandom_range(0, VL/S - 1));
        cfg[x].out_off = 2'($urandom);
      end
      #1;
      for (int x = 0; x < N; x++) begin
        logic used;
        used = cfg[x].en && vec_valid;
        checks++;
        if (xb_en[x] != used) begin failures++; $display("FAIL en xb %0d", x); end
        for (int r = 0; r < S; r++) begin
          elem_t exp;
          exp = used ? vec[int'(cfg[x].in_seg)*S + r] : elem_t'(0);
          checks++;
          if (xb_in[x][r] !== exp) begin
            failures++;
            $display("FAIL xb %0d row %0d got %0d exp %0d", x, r, xb_in[x][r], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
