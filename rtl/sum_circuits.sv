// sum_circuits: adds crossbar outputs into convolution results and routes them (SUM circuits).
//
// A kernel that is taller than one crossbar is split over several crossbars stacked in the
// row direction, and with mixed sizes the stack may combine a large crossbar with smaller
// ones (for example a 256x256 crossbar holding the part of the kernels that cannot be
// overlapped). The partial results of all crossbars of a stack must be added column by column.
// For every crossbar an ADD decoder reads the controller's routing entry: if the crossbar is
// used, its S columns are added onto the output lanes out_off*S .. out_off*S+S-1. The adders
// sum, per lane, everything the decoders put there, and the result is saturated to 8 bits.
// The encoder then sends the lane vector either to the bank's Pooling and ReLU circuits or to
// the shared bus, as the controller's dest setting says.
//
// Decoders, adders, encoder and the 8-bit result width follow the design description; the
// lane-offset encoding of the decoders and the wide internal sum before saturation are this
// design's choices.
//
// Timing: the crossbar outputs settle at the falling edge; the sum is registered at the next
// rising edge while in_valid is high, so results appear one rising edge after the bank
// presents a vector. One result per cycle.
module sum_circuits
  import misca_pkg::*;
#(
  parameter int unsigned N_XB  = 64,
  parameter int unsigned SL    = 512,
  parameter int unsigned SM    = 256,
  parameter int unsigned SS    = 128,
  parameter int unsigned LANES = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  dest_e   dest,
  input  elem_t   out_l [N_XB][SL],
  input  elem_t   out_m [N_XB][SM],
  input  elem_t   out_s [N_XB][SS],
  input  xb_cfg_t cfg_l [N_XB],
  input  xb_cfg_t cfg_m [N_XB],
  input  xb_cfg_t cfg_s [N_XB],
  output elem_t   sum   [LANES],
  output logic    to_pool_valid,
  output logic    to_bus_valid
);

  logic signed [31:0] acc [LANES];

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) acc[l] = '0;
    for (int x = 0; x < int'(N_XB); x++) begin
      if (cfg_l[x].en)
        for (int c = 0; c < int'(SL); c++)
          if (int'(cfg_l[x].out_off) * int'(SL) + c < int'(LANES))
            acc[int'(cfg_l[x].out_off) * int'(SL) + c] += 32'(out_l[x][c]);
      if (cfg_m[x].en)
        for (int c = 0; c < int'(SM); c++)
          if (int'(cfg_m[x].out_off) * int'(SM) + c < int'(LANES))
            acc[int'(cfg_m[x].out_off) * int'(SM) + c] += 32'(out_m[x][c]);
      if (cfg_s[x].en)
        for (int c = 0; c < int'(SS); c++)
          if (int'(cfg_s[x].out_off) * int'(SS) + c < int'(LANES))
            acc[int'(cfg_s[x].out_off) * int'(SS) + c] += 32'(out_s[x][c]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_pool_valid <= 1'b0;
      to_bus_valid  <= 1'b0;
      for (int l = 0; l < int'(LANES); l++) sum[l] <= '0;
    end else begin
      to_pool_valid <= in_valid && (dest == DEST_POOL);
      to_bus_valid  <= in_valid && (dest == DEST_BUS);
      if (in_valid)
        for (int l = 0; l < int'(LANES); l++) sum[l] <= sat8(acc[l]);
    end
  end

endmodule
