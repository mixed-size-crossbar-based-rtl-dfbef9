// rram_bank: one RRAM bank of the mixed-size crossbar accelerator.
//
// Data path of a bank, in order:
//   shared bus -> IDRC (block queue forming the merged input vector)
//              -> three crossbar selection submodules (one per array)
//              -> three process element arrays of 512x512, 256x256 and 128x128 crossbars
//              -> SUM circuits (add the crossbars of each output lane, then the encoder)
//              -> Pooling and ReLU circuits, or straight on
//              -> result FIFO in the controller -> shared bus.
// The controller (bank_ctrl) holds the layer settings and the per-crossbar routing table and
// runs the fetch/write-back loop over the shared bus.
//
// Overlapped mapping lives entirely in the weights and routing: the host writes each kernel
// several times, staggered, into the columns of the crossbars and sets the IDRC queue length
// to the merged vector length; the bank then produces several window positions per vector.
//
// Timing: a block read from the global buffer is pushed into the IDRC at the rising edge after
// the read data arrives; the crossbars are read at the falling edge of the next cycle, the sum
// is registered at the following rising edge, and pooling adds one more edge. With the bus to
// itself the bank fetches one block and writes one result in alternate cycles.
//
// The composition follows the described bank; the return path from the Pooling and ReLU
// circuits into the IDRC is not built: results always go back through the global buffer.
// Some outputs of the sub-blocks are left unread here: the IDRC's row_end pulse and the
// crossbars' valid flags (the controller tracks vectors with vec_valid, which already implies
// both), and the layer fields that only the controller itself uses.
module rram_bank
  import misca_pkg::*;
#(
  parameter int unsigned SL          = 512,
  parameter int unsigned SM          = 256,
  parameter int unsigned SS          = 128,
  parameter int unsigned N_XB        = 64,
  parameter int unsigned VEC_LEN     = 16384,
  parameter int unsigned LANES       = 512,
  parameter int unsigned POOL_GROUPS = 64,
  parameter int unsigned POOL_WIN    = 4,
  parameter int unsigned AW          = GBUF_AW,
  parameter int unsigned ADC_SHIFT   = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  // host instructions
  input  logic          instr_valid,
  input  instr_t        instr,
  input  elem_t         instr_wdata [SL],
  output logic          instr_ready,
  output logic          busy,
  output logic          done,
  // shared bus master port
  output logic          bus_req,
  output logic          bus_we,
  output logic [AW-1:0] bus_addr,
  output elem_t         bus_wdata [LANES],
  input  logic          bus_gnt,
  input  logic          bus_rvalid,
  input  elem_t         bus_rdata [LANES]
);

  layer_cfg_t layer;
  xb_cfg_t    cfg_l [N_XB];
  xb_cfg_t    cfg_m [N_XB];
  xb_cfg_t    cfg_s [N_XB];
  logic       wr_en_l, wr_en_m, wr_en_s;
  logic [$clog2(N_XB)-1:0] wr_xb;
  logic [8:0] wr_row;
  elem_t      wr_data [SL];
  elem_t      wr_data_m [SM];
  elem_t      wr_data_s [SS];
  logic       idrc_start, idrc_push, vec_valid, row_end;
  elem_t      vec [VEC_LEN];

  elem_t      in_l [N_XB][SL];
  elem_t      in_m [N_XB][SM];
  elem_t      in_s [N_XB][SS];
  logic       en_l [N_XB];
  logic       en_m [N_XB];
  logic       en_s [N_XB];
  elem_t      out_l [N_XB][SL];
  elem_t      out_m [N_XB][SM];
  elem_t      out_s [N_XB][SS];
  logic       val_l [N_XB];
  logic       val_m [N_XB];
  logic       val_s [N_XB];

  elem_t      sum [LANES];
  logic       to_pool_valid, to_bus_valid;
  elem_t      pooled [LANES];
  logic       pool_valid;
  logic       res_valid;
  elem_t      res_data [LANES];

  bank_ctrl #(.N_XB(N_XB), .SL(SL), .LANES(LANES), .AW(AW)) u_ctrl (
    .clk, .rst_n,
    .instr_valid, .instr, .instr_wdata, .instr_ready, .busy, .done,
    .layer, .cfg_l, .cfg_m, .cfg_s,
    .wr_en_l, .wr_en_m, .wr_en_s, .wr_xb, .wr_row, .wr_data,
    .idrc_start, .idrc_push, .idrc_vec_valid(vec_valid),
    .res_valid, .res_data,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_gnt, .bus_rvalid
  );

  idrc #(.VEC_LEN(VEC_LEN), .PUSH_W(LANES)) u_idrc (
    .clk, .rst_n,
    .start     (idrc_start),
    .vec_len   (layer.vec_len),
    .push_len  (layer.push_len),
    .step_pushes(layer.step_pushes),
    .row_pushes(layer.row_pushes),
    .push      (idrc_push),
    .push_data (bus_rdata),
    .vec       (vec),
    .vec_valid (vec_valid),
    .row_end   (row_end)
  );

  xb_sel #(.S(SL), .N_XB(N_XB), .VEC_LEN(VEC_LEN)) u_sel_l (
    .vec, .vec_valid, .cfg(cfg_l), .xb_in(in_l), .xb_en(en_l));
  xb_sel #(.S(SM), .N_XB(N_XB), .VEC_LEN(VEC_LEN)) u_sel_m (
    .vec, .vec_valid, .cfg(cfg_m), .xb_in(in_m), .xb_en(en_m));
  xb_sel #(.S(SS), .N_XB(N_XB), .VEC_LEN(VEC_LEN)) u_sel_s (
    .vec, .vec_valid, .cfg(cfg_s), .xb_in(in_s), .xb_en(en_s));

  always_comb begin
    for (int c = 0; c < int'(SM); c++) wr_data_m[c] = wr_data[c];
    for (int c = 0; c < int'(SS); c++) wr_data_s[c] = wr_data[c];
  end

  pea #(.S(SL), .N_XB(N_XB), .ADC_SHIFT(ADC_SHIFT)) u_pea_l (
    .clk, .rst_n, .xb_en(en_l), .xb_in(in_l),
    .wr_en(wr_en_l), .wr_xb, .wr_row(wr_row[$clog2(SL)-1:0]), .wr_data(wr_data),
    .xb_out(out_l), .xb_valid(val_l));
  pea #(.S(SM), .N_XB(N_XB), .ADC_SHIFT(ADC_SHIFT)) u_pea_m (
    .clk, .rst_n, .xb_en(en_m), .xb_in(in_m),
    .wr_en(wr_en_m), .wr_xb, .wr_row(wr_row[$clog2(SM)-1:0]), .wr_data(wr_data_m),
    .xb_out(out_m), .xb_valid(val_m));
  pea #(.S(SS), .N_XB(N_XB), .ADC_SHIFT(ADC_SHIFT)) u_pea_s (
    .clk, .rst_n, .xb_en(en_s), .xb_in(in_s),
    .wr_en(wr_en_s), .wr_xb, .wr_row(wr_row[$clog2(SS)-1:0]), .wr_data(wr_data_s),
    .xb_out(out_s), .xb_valid(val_s));

  sum_circuits #(.N_XB(N_XB), .SL(SL), .SM(SM), .SS(SS), .LANES(LANES)) u_sum (
    .clk, .rst_n,
    .in_valid(vec_valid), .dest(layer.dest),
    .out_l, .out_m, .out_s, .cfg_l, .cfg_m, .cfg_s,
    .sum, .to_pool_valid, .to_bus_valid);

  pool_relu #(.LANES(LANES), .GROUPS(POOL_GROUPS), .WIN(POOL_WIN)) u_pool (
    .clk, .rst_n, .mode(layer.pool_mode),
    .in_valid(to_pool_valid), .in(sum),
    .out(pooled), .out_valid(pool_valid));

  // Result to the controller's FIFO: from pooling, or straight from the SUM encoder.
  assign res_valid = pool_valid || to_bus_valid;
  assign res_data  = pool_valid ? pooled : sum;

endmodule
