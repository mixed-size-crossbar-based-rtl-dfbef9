// bank_ctrl: controller of one RRAM bank.
//
// The controller takes instructions from the host CPU and drives the rest of the bank:
//   OP_CFG_LAYER  latch the layer settings: the IDRC queue length (vec_len), block length
//                 (push_len) and row-end threshold of the IDRC counter (row_pushes), the
//                 number of blocks, the global-buffer addresses, the SUM encoder destination
//                 and the pooling mode.
//   OP_CFG_XB     write the routing entry of one crossbar (used or not, which input slice,
//                 which output lanes), read by the crossbar selection circuits and by the
//                 ADD decoders of the SUM circuits.
//   OP_WR_ROW     program one row of weights of one crossbar with the instruction's payload.
//   OP_RUN        run the layer: fetch n_push blocks from the global buffer over the shared
//                 bus into the IDRC, and write every result vector back, one word per result,
//                 at wr_base, wr_base+1, ...
// Instructions are accepted while the bank is idle (instr_ready); a run holds the bank busy
// until the last result has been written, then pulses done.
//
// Data flow: results wait in a small FIFO for the bus. A pending result always goes before
// the next block fetch, and a fetch is only issued while the FIFO has room for every result
// that blocks already fetched could still produce, so the pipeline behind the IDRC never has
// to stop. When the bus is taken by another bank the fetch simply waits (a stall).
//
// The controller's three duties (IDRC counter threshold, Sel settings, data flow) follow the
// design description; the instruction set, the FIFO and the credit rule are this design's.
module bank_ctrl
  import misca_pkg::*;
#(
  parameter int unsigned N_XB       = 64,
  parameter int unsigned SL         = 512,
  parameter int unsigned LANES      = 512,
  parameter int unsigned AW         = GBUF_AW,
  parameter int unsigned FIFO_DEPTH = 4
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
  // settings
  output layer_cfg_t    layer,
  output xb_cfg_t       cfg_l [N_XB],
  output xb_cfg_t       cfg_m [N_XB],
  output xb_cfg_t       cfg_s [N_XB],
  // weight programming
  output logic          wr_en_l,
  output logic          wr_en_m,
  output logic          wr_en_s,
  output logic [$clog2(N_XB)-1:0] wr_xb,
  output logic [8:0]    wr_row,
  output elem_t         wr_data [SL],
  // IDRC
  output logic          idrc_start,
  output logic          idrc_push,
  input  logic          idrc_vec_valid,
  // results from the SUM encoder / pooling
  input  logic          res_valid,
  input  elem_t         res_data [LANES],
  // shared bus master port
  output logic          bus_req,
  output logic          bus_we,
  output logic [AW-1:0] bus_addr,
  output elem_t         bus_wdata [LANES],
  input  logic          bus_gnt,
  input  logic          bus_rvalid
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------- result FIFO ----------------
  elem_t         fifo [FIFO_DEPTH][LANES];
  logic [CW-1:0] f_cnt;
  logic [$clog2(FIFO_DEPTH)-1:0] f_rd, f_wr;

  // ---------------- run state ----------------
  logic [15:0]   rd_cnt;      // blocks fetched (read granted)
  logic [AW-1:0] wr_ptr;      // next result address
  logic [7:0]    pend;        // fetched blocks whose result (or lack of it) is not yet known
  logic          push_d;      // a push happened in the previous cycle

  logic fetch_ok, do_write, do_read, w_gnt, r_gnt, res_in, nores;

  assign instr_ready = !busy;
  assign do_write = busy && (f_cnt != '0);
  assign fetch_ok = busy && (rd_cnt < layer.n_push) &&
                    (32'(f_cnt) + 32'(pend) < FIFO_DEPTH);
  assign do_read  = !do_write && fetch_ok;

  assign bus_req   = do_write || do_read;
  assign bus_we    = do_write;
  assign bus_addr  = do_write ? wr_ptr : (layer.rd_base + AW'(rd_cnt));
  assign bus_wdata = fifo[f_rd];
  assign w_gnt     = do_write && bus_gnt;
  assign r_gnt     = do_read && bus_gnt;

  assign idrc_push = busy && bus_rvalid;
  assign res_in    = busy && res_valid;
  assign nores     = push_d && !idrc_vec_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      layer      <= '0;
      wr_en_l    <= 1'b0;
      wr_en_m    <= 1'b0;
      wr_en_s    <= 1'b0;
      wr_xb      <= '0;
      wr_row     <= '0;
      idrc_start <= 1'b0;
      rd_cnt     <= '0;
      wr_ptr     <= '0;
      pend       <= '0;
      push_d     <= 1'b0;
      f_cnt      <= '0;
      f_rd       <= '0;
      f_wr       <= '0;
      for (int x = 0; x < int'(N_XB); x++) begin
        cfg_l[x] <= '0;
        cfg_m[x] <= '0;
        cfg_s[x] <= '0;
      end
      for (int c = 0; c < int'(SL); c++) wr_data[c] <= '0;
    end else begin
      done       <= 1'b0;
      wr_en_l    <= 1'b0;
      wr_en_m    <= 1'b0;
      wr_en_s    <= 1'b0;
      idrc_start <= 1'b0;
      push_d     <= idrc_push;

      if (instr_valid && instr_ready) begin
        unique case (instr.op)
          OP_CFG_LAYER: layer <= instr.layer;
          OP_CFG_XB: begin
            if (instr.pea == 2'd0) cfg_l[instr.xb] <= instr.xb_cfg;
            if (instr.pea == 2'd1) cfg_m[instr.xb] <= instr.xb_cfg;
            if (instr.pea == 2'd2) cfg_s[instr.xb] <= instr.xb_cfg;
          end
          OP_WR_ROW: begin
            wr_en_l <= (instr.pea == 2'd0);
            wr_en_m <= (instr.pea == 2'd1);
            wr_en_s <= (instr.pea == 2'd2);
            wr_xb   <= instr.xb[$clog2(N_XB)-1:0];
            wr_row  <= instr.row;
            wr_data <= instr_wdata;
          end
          OP_RUN: begin
            busy       <= 1'b1;
            idrc_start <= 1'b1;
            rd_cnt     <= '0;
            wr_ptr     <= layer.wr_base;
            pend       <= '0;
          end
          default: ;
        endcase
      end

      if (busy) begin
        if (r_gnt) rd_cnt <= rd_cnt + 16'd1;
        pend <= pend + 8'(r_gnt) - 8'(res_in) - 8'(nores);

        if (res_in) begin
          fifo[f_wr] <= res_data;
          f_wr <= f_wr + 1'b1;
        end
        if (w_gnt) begin
          f_rd   <= f_rd + 1'b1;
          wr_ptr <= wr_ptr + AW'(1);
        end
        f_cnt <= f_cnt + CW'(res_in) - CW'(w_gnt);

        if (rd_cnt == layer.n_push && pend == '0 && f_cnt == '0 && !push_d && !idrc_push) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(res_in && (32'(f_cnt) == FIFO_DEPTH) && !w_gnt));

endmodule
