// tb_misca_top: end-to-end test of the whole accelerator at reduced crossbar sizes
// (16/8/4 instead of 512/256/128, 4 crossbars per array, 16-lane bus) with all 8 banks.
// The scenario is described in misca_top_scenario.svh.
module tb_misca_top;
  import misca_pkg::*;
  localparam int SL = 16, SM = 8, SS = 4, NXB = 4, VL = 32, LANES = 16, AW = GBUF_AW, PG = 2, PW = 4;
  localparam int NB = 8;
  localparam int K = 2, CIN = 2, COUT = 3, H = 4, WD = 7, SP = 2;

  misca_top #(.N_BANKS(NB), .SL(SL), .SM(SM), .SS(SS), .N_XB(NXB), .VEC_LEN(VL), .LANES(LANES),
              .POOL_GROUPS(PG), .POOL_WIN(PW), .AW(AW)) dut (.*);

`include "misca_top_scenario.svh"
endmodule
