// misca_top: mixed-size crossbar RRAM CNN accelerator, top level.
//
// N_BANKS RRAM banks and one global buffer share a single bus that carries feature maps and
// results between layers. Each bank has large (512x512), medium (256x256) and small (128x128)
// crossbar arrays of 64 crossbars each, so the whole chip holds 512 crossbars of every size.
// The host CPU is outside this design: its instruction port reaches every bank controller
// (instr_valid picks the bank, instr and instr_wdata are shared), and it loads inputs into and
// reads results out of the global buffer through its own master port on the bus, which it
// shares with the banks under round-robin arbitration (host is master N_BANKS).
//
// Timing: host bus transfers follow the bus handshake (hold req until gnt; read data with
// host_rvalid one cycle after the grant). A bank accepts an instruction in any cycle in which
// its instr_ready is high, and pulses done when a run has written its last result.
//
// The bank count, the shared bus and the global buffer follow the design description; the
// host port and the instruction broadcast are this design's choices.
module misca_top
  import misca_pkg::*;
#(
  parameter int unsigned N_BANKS     = 8,
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
  // host instruction port
  input  logic          instr_valid [N_BANKS],
  input  instr_t        instr,
  input  elem_t         instr_wdata [SL],
  output logic          instr_ready [N_BANKS],
  output logic          busy        [N_BANKS],
  output logic          done        [N_BANKS],
  // host access to the global buffer
  input  logic          host_req,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  elem_t         host_wdata [LANES],
  output logic          host_gnt,
  output logic          host_rvalid,
  output elem_t         host_rdata [LANES]
);

  localparam int unsigned N_M = N_BANKS + 1;

  logic          m_req    [N_M];
  logic          m_we     [N_M];
  logic [AW-1:0] m_addr   [N_M];
  elem_t         m_wdata  [N_M][LANES];
  logic          m_gnt    [N_M];
  logic          m_rvalid [N_M];
  elem_t         m_rdata  [LANES];

  logic          s_req, s_we, s_rvalid;
  logic [AW-1:0] s_addr;
  elem_t         s_wdata [LANES];
  elem_t         s_rdata [LANES];

  for (genvar b = 0; b < int'(N_BANKS); b++) begin : g_bank
    rram_bank #(
      .SL(SL), .SM(SM), .SS(SS), .N_XB(N_XB), .VEC_LEN(VEC_LEN), .LANES(LANES),
      .POOL_GROUPS(POOL_GROUPS), .POOL_WIN(POOL_WIN), .AW(AW), .ADC_SHIFT(ADC_SHIFT)
    ) u_bank (
      .clk, .rst_n,
      .instr_valid(instr_valid[b]), .instr, .instr_wdata,
      .instr_ready(instr_ready[b]), .busy(busy[b]), .done(done[b]),
      .bus_req(m_req[b]), .bus_we(m_we[b]), .bus_addr(m_addr[b]), .bus_wdata(m_wdata[b]),
      .bus_gnt(m_gnt[b]), .bus_rvalid(m_rvalid[b]), .bus_rdata(m_rdata)
    );
  end

  assign m_req[N_BANKS]   = host_req;
  assign m_we[N_BANKS]    = host_we;
  assign m_addr[N_BANKS]  = host_addr;
  assign m_wdata[N_BANKS] = host_wdata;
  assign host_gnt    = m_gnt[N_BANKS];
  assign host_rvalid = m_rvalid[N_BANKS];
  assign host_rdata  = m_rdata;

  shared_bus #(.N_M(N_M), .LANES(LANES), .AW(AW)) u_bus (
    .clk, .rst_n,
    .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_rdata, .s_rvalid
  );

  global_buffer #(.LANES(LANES), .AW(AW)) u_gbuf (
    .clk, .rst_n,
    .req(s_req), .we(s_we), .addr(s_addr), .wdata(s_wdata),
    .rdata(s_rdata), .rvalid(s_rvalid)
  );

endmodule
