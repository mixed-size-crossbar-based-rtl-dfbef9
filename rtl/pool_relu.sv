// pool_relu: pooling and ReLU circuits of a bank.
//
// Modes (pool_mode_e):
//   POOL_NONE  out[l] = in[l] on all LANES lanes.
//   POOL_RELU  out[l] = max(in[l], 0) on all LANES lanes: one comparator per lane.
//   POOL_MAX   the first GROUPS*WIN lanes form GROUPS windows of WIN consecutive lanes;
//              out[g] = max(0, window g). The comparators of the ReLU part are reused as the
//              nodes of a comparator tree over the window, so a window of WIN values takes
//              log2(WIN) comparator levels. Lanes GROUPS and up read zero.
//   POOL_AVG   out[g] = (sum of window g) / WIN. In the described circuit this is done by
//              GROUPS small crossbars whose cells all hold the weight 1/WIN; here the same
//              function is computed digitally with an arithmetic right shift (floor).
// The three parts, the comparator reuse, the tree and the 64 averaging crossbars of
// 4 inputs follow the design description. That a window arrives as WIN adjacent lanes (the
// mapping orders the crossbar columns that way) is this design's choice.
//
// Timing: one rising edge from in_valid to out_valid; one vector per cycle.
module pool_relu
  import misca_pkg::*;
#(
  parameter int unsigned LANES  = 512,
  parameter int unsigned GROUPS = 64,
  parameter int unsigned WIN    = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pool_mode_e mode,
  input  logic       in_valid,
  input  elem_t      in  [LANES],
  output elem_t      out [LANES],
  output logic       out_valid
);

  localparam int unsigned LOG_WIN = $clog2(WIN);

  // ReLU comparator shared by the ReLU part and the max-pooling tree.
  function automatic elem_t cmp_max(input elem_t a, input elem_t b);
    return (a > b) ? a : b;
  endfunction

  elem_t relu [LANES];
  elem_t pooled_max [GROUPS];
  elem_t pooled_avg [GROUPS];

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) relu[l] = cmp_max(in[l], elem_t'(0));
  end

  for (genvar g = 0; g < int'(GROUPS); g++) begin : g_win
    elem_t tree [LOG_WIN+1][WIN];
    always_comb begin
      for (int w = 0; w < int'(WIN); w++) tree[0][w] = relu[g*WIN + w];
      for (int lv = 1; lv <= int'(LOG_WIN); lv++)
        for (int w = 0; w < int'(WIN); w++)
          tree[lv][w] = (w < (int'(WIN) >> lv))
                      ? cmp_max(tree[lv-1][2*w], tree[lv-1][2*w+1]) : elem_t'(0);
    end
    assign pooled_max[g] = tree[LOG_WIN][0];

    always_comb begin
      logic signed [15:0] s;
      s = '0;
      for (int w = 0; w < int'(WIN); w++) s += 16'(in[g*WIN + w]);
      pooled_avg[g] = elem_t'(s >>> LOG_WIN);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < int'(LANES); l++) out[l] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int l = 0; l < int'(LANES); l++) begin
          unique case (mode)
            POOL_NONE: out[l] <= in[l];
            POOL_RELU: out[l] <= relu[l];
            POOL_MAX:  out[l] <= (l < int'(GROUPS)) ? pooled_max[l] : elem_t'(0);
            POOL_AVG:  out[l] <= (l < int'(GROUPS)) ? pooled_avg[l] : elem_t'(0);
            default:   out[l] <= in[l];
          endcase
        end
      end
    end
  end

endmodule
