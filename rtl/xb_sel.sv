// xb_sel: crossbar selection submodule for one process element array.
//
// The merged input vector from the input data rearrangement circuits is cut into
// VEC_LEN/S slices of S elements, one slice per crossbar height. For every crossbar the
// controller's routing entry says whether the crossbar is used (en) and which slice drives
// its rows (in_seg). A decoder turns in_seg into a one-hot select (whose OR is the
// crossbar's enable), and one multiplexer per crossbar picks the slice; unused crossbars, and all crossbars while no
// vector is valid, get zero input and are disabled. A slice index past the vector decodes
// to no select, so that crossbar is treated as unused. That decoder-plus-MUX structure and the
// zero input to unused crossbars follow the design description; the slice granularity is
// this design's choice. The block is purely combinational.
module xb_sel
  import misca_pkg::*;
#(
  parameter int unsigned S       = 512,
  parameter int unsigned N_XB    = 64,
  parameter int unsigned VEC_LEN = 16384
) (
  input  elem_t   vec      [VEC_LEN],
  input  logic    vec_valid,
  input  xb_cfg_t cfg      [N_XB],
  output elem_t   xb_in    [N_XB][S],
  output logic    xb_en    [N_XB]
);

  localparam int unsigned NSEG = VEC_LEN / S;

  for (genvar x = 0; x < int'(N_XB); x++) begin : g_xb
    logic [NSEG-1:0] onehot;   // decoder output

    always_comb begin
      for (int s = 0; s < int'(NSEG); s++)
        onehot[s] = cfg[x].en && vec_valid && (int'(cfg[x].in_seg) == s);
    end

    assign xb_en[x] = |onehot;

    // The MUX: the slice named by in_seg, or zero for an unused crossbar.
    always_comb begin
      for (int r = 0; r < int'(S); r++)
        xb_in[x][r] = xb_en[x] ? vec[int'(cfg[x].in_seg) * int'(S) + r] : elem_t'(0);
    end
  end

endmodule
