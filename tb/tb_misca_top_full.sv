// tb_misca_top_full: the same end-to-end scenario as tb_misca_top on the accelerator at its
// full default size: 8 banks, each with 64 crossbars of 512x512, 256x256 and 128x128, a
// 16384-element IDRC queue and a 512-lane bus. The convolution has 48 input channels so that
// the merged vector (288 elements) is taller than a medium crossbar and the mixed-size runs
// put rows 0-255 on a 256x256 crossbar and rows 256-287 on a 128x128 crossbar.
module tb_misca_top_full;
  import misca_pkg::*;
  localparam int SL = 512, SM = 256, SS = 128, LANES = 512, AW = GBUF_AW, PG = 64, PW = 4;
  localparam int NB = 8;
  localparam int K = 2, CIN = 48, COUT = 3, H = 4, WD = 7, SP = 2;

  misca_top dut (.*);

`include "misca_top_scenario.svh"
endmodule
