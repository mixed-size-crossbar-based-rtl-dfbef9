// shared_bus: the bus that all banks (and the host) share to reach the global buffer.
//
// N_M masters each raise req with we/addr/wdata and hold them until gnt. A round-robin
// arbiter grants one request per cycle, starting its search after the last master granted,
// and forwards it to the global buffer in the same cycle. For a read, the buffer's data comes
// back one cycle later; the bus remembers which master it granted and raises that master's
// rvalid alone, with rdata broadcast to all. One transfer per cycle for the whole chip is
// what makes the buffer bandwidth a limit of the accelerator.
//
// That banks and buffer share one bus follows the design description; the arbitration and
// the request/grant handshake are this design's choices.
module shared_bus
  import misca_pkg::*;
#(
  parameter int unsigned N_M   = 9,
  parameter int unsigned LANES = 512,
  parameter int unsigned AW    = GBUF_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // masters
  input  logic          m_req   [N_M],
  input  logic          m_we    [N_M],
  input  logic [AW-1:0] m_addr  [N_M],
  input  elem_t         m_wdata [N_M][LANES],
  output logic          m_gnt   [N_M],
  output logic          m_rvalid[N_M],
  output elem_t         m_rdata [LANES],
  // global buffer side
  output logic          s_req,
  output logic          s_we,
  output logic [AW-1:0] s_addr,
  output elem_t         s_wdata [LANES],
  input  elem_t         s_rdata [LANES],
  input  logic          s_rvalid
);

  localparam int unsigned IW = (N_M > 1) ? $clog2(N_M) : 1;

  logic [IW-1:0] last_q;     // last master granted
  logic [IW-1:0] sel;        // master granted this cycle
  logic          any;
  logic [IW-1:0] rd_owner_q; // master whose read is returning

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = 1; k <= int'(N_M); k++) begin
      int m;
      m = (int'(last_q) + k) % int'(N_M);
      if (!any && m_req[m]) begin
        any = 1'b1;
        sel = IW'(m);
      end
    end
  end

  always_comb begin
    for (int m = 0; m < int'(N_M); m++) m_gnt[m] = any && (sel == IW'(m));
    s_req   = any;
    s_we    = m_we[sel];
    s_addr  = m_addr[sel];
    s_wdata = m_wdata[sel];
    m_rdata = s_rdata;
    for (int m = 0; m < int'(N_M); m++) m_rvalid[m] = s_rvalid && (rd_owner_q == IW'(m));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q     <= IW'(N_M - 1);
      rd_owner_q <= '0;
    end else if (any) begin
      last_q     <= sel;
      rd_owner_q <= sel;
    end
  end

  // Exactly one grant per cycle at most, and only to a requester.
  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n)
    any |-> m_req[sel]);

endmodule
