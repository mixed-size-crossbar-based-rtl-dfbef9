// idrc: input data rearrangement circuits (block queue and row counter).
//
// With overlapped mapping a crossbar column stack is fed one long vector that covers several
// neighbouring positions of the convolution window at once. The feature map arrives as a
// stream of blocks (each block is the window columns the window slides over in one step,
// K x stride x C_in elements per window position). The queue keeps the most recent vec_len
// elements of that stream: each push drops the oldest push_len elements from the front and
// appends the new block at the end, so the queue always holds the merged vector of the
// current window positions, oldest element at index 0. Elements at index vec_len and above
// are held at zero, so crossbar rows past the vector see no input.
//
// A window step may need more elements than one push carries (a block of K x stride x C_in
// elements can exceed the bus width); step_pushes pushes then make one step, and a vector is
// presented only after the last push of a step.
//
// The counter counts pushes within a feature-map row. When it reaches row_pushes (the window
// has reached the end of the row) the queue is flushed once the last vector of the row is out,
// and the next row is loaded from empty. A vector is only presented once the queue has been
// filled with vec_len elements since the last flush.
//
// The queue, the counter and the flush at the row end follow the design description. Allowing
// a push of any length up to PUSH_W (so one push can bring several window steps at once) is
// this design's choice.
//
// Timing: a push at a rising edge updates vec and vec_valid at that edge; vec_valid is high for
// one cycle per push that completes a vector, so with one push per cycle a vector is produced
// every cycle. row_end pulses with the push that ends a row. The default queue length, 16384,
// is the height of a column of 32 large crossbars (an array is 32 x 2 crossbars). start clears the queue and counter.
module idrc
  import misca_pkg::*;
#(
  parameter int unsigned VEC_LEN = 16384,
  parameter int unsigned PUSH_W  = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [14:0]  vec_len,
  input  logic [9:0]   push_len,
  input  logic [3:0]   step_pushes,
  input  logic [15:0]  row_pushes,
  input  logic         push,
  input  elem_t        push_data [PUSH_W],
  output elem_t        vec [VEC_LEN],
  output logic         vec_valid,
  output logic         row_end
);

  logic [15:0] fill;       // elements held since the last flush, saturates at vec_len
  logic [15:0] pcount;     // pushes in the current row
  logic [3:0]  scount;     // pushes in the current window step

  logic [15:0] fill_sum;
  logic        last_in_row, last_in_step;

  assign fill_sum     = fill + 16'(push_len);
  assign last_in_row  = (pcount + 16'd1 >= row_pushes);
  assign last_in_step = (scount + 4'd1 >= step_pushes);

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      fill      <= '0;
      pcount    <= '0;
      scount    <= '0;
      vec_valid <= 1'b0;
      row_end   <= 1'b0;
      for (int i = 0; i < int'(VEC_LEN); i++) vec[i] <= '0;
    end else begin
      vec_valid <= 1'b0;
      row_end   <= 1'b0;
      if (push) begin
        for (int i = 0; i < int'(VEC_LEN); i++) begin
          int src;
          src = i + int'(push_len);
          if (i >= int'(vec_len))
            vec[i] <= '0;
          else if (src < int'(vec_len))
            vec[i] <= vec[src];
          else if (src - int'(vec_len) < int'(PUSH_W))
            vec[i] <= push_data[src - int'(vec_len)];
          else
            vec[i] <= '0;
        end
        vec_valid <= (fill_sum >= 16'(vec_len)) && last_in_step;
        scount    <= last_in_step ? 4'd0 : scount + 4'd1;
        if (last_in_row) begin
          fill    <= '0;           // flush: the next row starts from an empty queue
          pcount  <= '0;
          scount  <= '0;
          row_end <= 1'b1;
        end else begin
          fill   <= (fill_sum >= 16'(vec_len)) ? 16'(vec_len) : fill_sum;
          pcount <= pcount + 16'd1;
        end
      end
    end
  end

endmodule
