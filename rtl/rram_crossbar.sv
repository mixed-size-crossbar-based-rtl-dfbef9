// rram_crossbar: behavioural model of one RRAM crossbar with its DACs and ADCs.
//
// This is a behavioural model, not synthesizable circuitry: the real part is an analog array
// of resistive cells. Each wordline is driven by a DAC from one input element, every cell
// contributes conductance x voltage to its bitline current, and an ADC per column digitises
// the current, so column k produces out[k] = sum_j g[j][k] * vin[j] (the crossbar's
// matrix-vector product). Here the conductances are signed 8-bit weights and the ADC result
// is the exact integer sum shifted right by ADC_SHIFT and saturated to 8 bits; the ADC
// resolution and scaling are assumptions of this model.
//
// Timing: the inputs are sampled and the ADC outputs update at the falling clock edge of a
// cycle in which en is high, as the design reads crossbar results at the falling edge.
// out_valid is high for the half cycle after that edge until the next falling edge. When en is
// low the crossbar is idle (it receives zero input from the selection circuits) and its
// outputs read zero.
//
// Weights are written one wordline (row) at a time through wr_en/wr_row/wr_data at the
// rising edge; rst_n clears all cells so nothing unwritten is ever read.
module rram_crossbar
  import misca_pkg::*;
#(
  parameter int unsigned S         = 512,  // rows = columns
  parameter int unsigned ADC_SHIFT = 0     // right shift applied before the 8-bit ADC code
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  elem_t        vin  [S],
  input  logic         wr_en,
  input  logic [$clog2(S)-1:0] wr_row,
  input  elem_t        wr_data [S],
  output elem_t        out  [S],
  output logic         out_valid
);

  elem_t g [S][S];   // g[row][col]

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(S); r++)
        for (int c = 0; c < int'(S); c++)
          g[r][c] <= '0;
    end else if (wr_en) begin
      for (int c = 0; c < int'(S); c++)
        g[wr_row][c] <= wr_data[c];
    end
  end

  always_ff @(negedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < int'(S); c++) out[c] <= '0;
    end else begin
      out_valid <= en;
      for (int c = 0; c < int'(S); c++) begin
        logic signed [31:0] acc;
        acc = '0;
        if (en)
          for (int r = 0; r < int'(S); r++)
            acc += 32'(g[r][c]) * 32'(vin[r]);
        out[c] <= sat8(acc >>> ADC_SHIFT);
      end
    end
  end

endmodule
