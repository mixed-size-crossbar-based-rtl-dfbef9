// tb_bank_ctrl: the controller against a model of the rest of a bank and of the bus.
// Checks instruction decoding (layer settings, routing entries, weight-row write pulses),
// that a run fetches exactly n_push blocks from consecutive addresses, that every result is
// written back in order at consecutive addresses even when the bus refuses grants at random
// (stalls), that the FIFO never overflows, and that done follows the last write.
module tb_bank_ctrl;
  import misca_pkg::*;
  localparam int N = 4, SL = 8, L = 4, AW = GBUF_AW, FD = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid = 1'b0, instr_ready, busy, done;
  instr_t instr;
  elem_t instr_wdata [SL];
  layer_cfg_t layer;
  xb_cfg_t cfg_l [N], cfg_m [N], cfg_s [N];
  logic wr_en_l, wr_en_m, wr_en_s;
  logic [$clog2(N)-1:0] wr_xb;
  logic [8:0] wr_row;
  elem_t wr_data [SL];
  logic idrc_start, idrc_push, idrc_vec_valid = 1'b0;
  logic res_valid = 1'b0;
  elem_t res_data [L];
  logic bus_req, bus_we, bus_gnt, bus_rvalid = 1'b0;
  logic [AW-1:0] bus_addr;
  elem_t bus_wdata [L];
  int checks = 0, failures = 0, stalls = 0;

  bank_ctrl #(.N_XB(N), .SL(SL), .LANES(L), .AW(AW), .FIFO_DEPTH(FD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- model of bus + IDRC + datapath ----
  int gnt_pct = 100;
  logic [AW-1:0] rd_addr_q;
  int pushes = 0, skip = 0;
  logic [AW-1:0] pipe_tag [4];
  logic pipe_v [4];
  int reads [$];
  int writes_addr [$];
  int writes_tag [$];

  assign bus_gnt = bus_req && ($urandom_range(1, 100) <= gnt_pct);

  always_ff @(posedge clk) begin
    bus_rvalid <= bus_gnt && !bus_we;
    rd_addr_q <= bus_addr;
    if (bus_gnt && !bus_we) reads.push_back(int'(bus_addr));
    if (bus_gnt && bus_we) begin
      writes_addr.push_back(int'(bus_addr));
      writes_tag.push_back(int'(bus_wdata[0]) & 8'hff);
    end
    if (bus_req && !bus_gnt) stalls++;
    // IDRC: vector after the first `skip` pushes of the run
    idrc_vec_valid <= 1'b0;
    pipe_v[0] <= 1'b0;
    if (idrc_start) pushes = 0;
    if (idrc_push) begin
      pushes++;
      idrc_vec_valid <= (pushes > skip);
      pipe_v[0] <= (pushes > skip);
      pipe_tag[0] <= rd_addr_q;
    end
    for (int i = 1; i < 4; i++) begin pipe_v[i] <= pipe_v[i-1]; pipe_tag[i] <= pipe_tag[i-1]; end
  end
  // results leave the model two edges after the vector (sum, then pooling)
  always_comb begin
    res_valid = pipe_v[2];
    for (int l = 0; l < L; l++) res_data[l] = elem_t'(pipe_tag[2]);
  end

  task automatic issue(input instr_t i);
    instr <= i;
    instr_valid <= 1'b1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 1'b0;
    #1;
  endtask

  task automatic run_layer(input int n, input int sk, input int rb, input int wb, input int pct);
    instr_t i;
    int t0;
    i = '0;
    i.op = OP_CFG_LAYER;
    i.layer.n_push = 16'(n);
    i.layer.rd_base = AW'(rb);
    i.layer.wr_base = AW'(wb);
    i.layer.vec_len = 15'd3;
    issue(i);
    checks++;
    if (layer.n_push != 16'(n) || layer.rd_base != AW'(rb)) begin failures++; $display("FAIL layer"); end
    skip = sk; gnt_pct = pct;
    reads.delete(); writes_addr.delete(); writes_tag.delete();
    i.op = OP_RUN;
    issue(i);
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    checks++;
    if (reads.size() != n) begin failures++; $display("FAIL %0d reads", reads.size()); end
    for (int k = 0; k < reads.size(); k++) begin
      checks++;
      if (reads[k] != rb + k) begin failures++; $display("FAIL read %0d addr %0d", k, reads[k]); end
    end
    checks++;
    if (writes_addr.size() != n - sk) begin failures++; $display("FAIL %0d writes", writes_addr.size()); end
    for (int k = 0; k < writes_addr.size(); k++) begin
      checks++;
      if (writes_addr[k] != wb + k || writes_tag[k] != ((rb + sk + k) & 8'hff)) begin
        failures++; $display("FAIL write %0d addr %0d tag %0d", k, writes_addr[k], writes_tag[k]);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (busy || !instr_ready) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    instr = '0;
    foreach (instr_wdata[i]) instr_wdata[i] = '0;
    foreach (pipe_v[i]) begin pipe_v[i] = 1'b0; pipe_tag[i] = '0; end
    rd_addr_q = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // routing entries and weight rows
    for (int p = 0; p < 3; p++)
      for (int x = 0; x < N; x++) begin
        instr_t i;
        i = '0;
        i.op = OP_CFG_XB; i.pea = 2'(p); i.xb = 6'(x);
        i.xb_cfg.en = 1'b1; i.xb_cfg.in_seg = 7'(x + p); i.xb_cfg.out_off = 2'(x);
        issue(i);
      end
    for (int x = 0; x < N; x++) begin
      checks++;
      if (cfg_l[x].in_seg != 7'(x) || cfg_m[x].in_seg != 7'(x + 1) || cfg_s[x].in_seg != 7'(x + 2)
          || !cfg_s[x].en || cfg_m[x].out_off != 2'(x)) begin
        failures++; $display("FAIL routing entry %0d", x);
      end
    end
    begin
      instr_t i;
      i = '0;
      i.op = OP_WR_ROW; i.pea = 2'd1; i.xb = 6'd2; i.row = 9'd5;
      foreach (instr_wdata[c]) instr_wdata[c] = elem_t'(c + 1);
      instr <= i; instr_valid <= 1'b1;
      @(posedge clk);
      instr_valid <= 1'b0;
      #1;
      checks++;
      if (!wr_en_m || wr_en_l || wr_en_s || wr_xb != 2 || wr_row != 5 || wr_data[3] != 4) begin
        failures++; $display("FAIL weight write");
      end
      @(posedge clk); #1;
      checks++;
      if (wr_en_m) begin failures++; $display("FAIL write pulse too long"); end
    end
    run_layer(10, 2, 100, 300, 100);
    run_layer(25, 3, 7, 500, 40);     // bus often taken by others
    run_layer(6, 0, 0, 900, 70);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
