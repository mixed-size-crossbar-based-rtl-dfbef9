// global_buffer: on-chip global buffer holding feature maps between layers.
//
// One word is a row of LANES 8-bit elements, the width of the shared bus, so a whole block of
// input data or a whole vector of results moves in one transfer. The buffer is a single-port
// synchronous memory: a request with we set writes wdata at addr; a request without we reads
// addr, and rdata/rvalid follow one rising edge later. The word width and depth are this
// design's choices: the architecture names a global buffer shared by all banks but gives
// neither (its evaluation used an off-chip DDR4 device in this role).
module global_buffer
  import misca_pkg::*;
#(
  parameter int unsigned LANES = 512,
  parameter int unsigned AW    = GBUF_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  elem_t         wdata [LANES],
  output elem_t         rdata [LANES],
  output logic          rvalid
);

  elem_t mem [2**AW][LANES];

  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
    end else begin
      rvalid <= req && !we;
      if (req && !we) rdata <= mem[addr];
    end
  end

endmodule
