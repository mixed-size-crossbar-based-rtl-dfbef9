// misca_pkg: types and constants shared by the mixed-size crossbar CNN accelerator.
//
// The accelerator holds CNN weights as conductances in RRAM crossbars of three sizes
// (512x512, 256x256, 128x128). A bank turns a stream of feature-map blocks into long merged
// input vectors (overlapped mapping: the vector for several neighbouring window positions is
// loaded at once), routes segments of that vector to the crossbars it uses, adds the crossbar
// outputs that belong to the same output channel, and optionally applies ReLU and pooling.
//
// The crossbar sizes, the bank count, the crossbars per array, the 8-bit adders and the
// 64 averaging crossbars follow the design description. Widths of vectors, buses, the
// global buffer and the instruction format are this design's own choices.
package misca_pkg;

  // Data element: 8-bit signed value (activations, weights, partial sums).
  localparam int unsigned DATA_W = 8;
  typedef logic signed [DATA_W-1:0] elem_t;

  // Global buffer address width (16384 words of 512 elements, 8 MiB); the layer settings carry
  // addresses of this width.
  localparam int unsigned GBUF_AW  = 14;

  typedef enum logic [1:0] {
    POOL_NONE = 2'd0,   // pass the sums through
    POOL_RELU = 2'd1,   // y = max(x, 0)
    POOL_MAX  = 2'd2,   // ReLU then max over each window
    POOL_AVG  = 2'd3    // mean over each window
  } pool_mode_e;

  typedef enum logic {
    DEST_BUS  = 1'b0,   // SUM encoder sends the sums straight to the shared bus
    DEST_POOL = 1'b1    // SUM encoder sends the sums through Pooling and ReLU
  } dest_e;

  // Per-crossbar routing entry held by the controller. in_seg picks which slice of the
  // merged input vector drives the crossbar rows; out_off places its columns on the lanes
  // of the SUM circuits (in units of the crossbar size).
  typedef struct packed {
    logic       en;
    logic [6:0] in_seg;
    logic [1:0] out_off;
  } xb_cfg_t;

  // Layer settings written by the CPU before a run.
  typedef struct packed {
    logic [14:0]        vec_len;     // merged vector length in elements (1..VEC_LEN)
    logic [9:0]         push_len;    // elements entering the queue per block (1..LANES)
    logic [3:0]         step_pushes; // pushes per window step (a vector every step; 0 = 1)
    logic [15:0]        row_pushes;  // pushes per feature-map row; queue flushes after them
    logic [15:0]        n_push;      // pushes in the whole run
    logic [GBUF_AW-1:0] rd_base;     // global buffer word of the first input block
    logic [GBUF_AW-1:0] wr_base;     // global buffer word of the first result
    dest_e              dest;
    pool_mode_e         pool_mode;
  } layer_cfg_t;

  typedef enum logic [2:0] {
    OP_NOP       = 3'd0,
    OP_CFG_LAYER = 3'd1,   // load layer_cfg_t
    OP_CFG_XB    = 3'd2,   // load the routing entry of crossbar (pea, xb)
    OP_WR_ROW    = 3'd3,   // write one row of weights of crossbar (pea, xb)
    OP_RUN       = 3'd4    // run the configured layer
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [1:0] pea;       // 0 large, 1 medium, 2 small
    logic [5:0] xb;
    logic [8:0] row;
    xb_cfg_t    xb_cfg;
    layer_cfg_t layer;
  } instr_t;

  // Saturate a wide signed value to one data element.
  function automatic elem_t sat8(input logic signed [31:0] v);
    if (v > 32'sd127) return 8'sd127;
    if (v < -32'sd128) return -8'sd128;
    return elem_t'(v);
  endfunction

endpackage
