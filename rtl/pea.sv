// pea: process element array, N_XB crossbars of one size S.
//
// A bank has three of these: one of 512x512, one of 256x256 and one of 128x128 crossbars,
// 64 crossbars each (32 x 2). Every crossbar gets its own input slice from the crossbar
// selection circuits and an enable; the ADC outputs of all crossbars are sent on to the SUM
// circuits. The array adds no logic of its own beyond addressing weight writes: a row write
// names the crossbar (wr_xb) and the row, and only that crossbar takes it.
//
// Timing is the crossbar's: outputs update at the falling edge of a cycle with en set.
module pea
  import misca_pkg::*;
#(
  parameter int unsigned S         = 512,
  parameter int unsigned N_XB      = 64,
  parameter int unsigned ADC_SHIFT = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   xb_en  [N_XB],
  input  elem_t  xb_in  [N_XB][S],
  input  logic   wr_en,
  input  logic [$clog2(N_XB)-1:0] wr_xb,
  input  logic [$clog2(S)-1:0]    wr_row,
  input  elem_t  wr_data [S],
  output elem_t  xb_out [N_XB][S],
  output logic   xb_valid [N_XB]
);

  for (genvar x = 0; x < int'(N_XB); x++) begin : g_xb
    rram_crossbar #(.S(S), .ADC_SHIFT(ADC_SHIFT)) u_xb (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (xb_en[x]),
      .vin      (xb_in[x]),
      .wr_en    (wr_en && (wr_xb == x[$clog2(N_XB)-1:0])),
      .wr_row   (wr_row),
      .wr_data  (wr_data),
      .out      (xb_out[x]),
      .out_valid(xb_valid[x])
    );
  end

endmodule
