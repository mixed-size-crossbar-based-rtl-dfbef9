// Shared body of the top-level testbenches. The including module defines SL, SM, SS, LANES,
// AW, PG, PW and NB (the top's sizes) and the convolution shape K, CIN, COUT, H, WD, SP, and
// instantiates the top as `dut`.
//
// Scenario: the host loads a feature map into the global buffer over the bus, then four banks
// run the same overlapped-mapped convolution at once, competing for the bus:
//   bank 0       one large crossbar, sums straight to the bus
//   bank 1       rows split over a medium and small crossbars (mixed sizes), ReLU
//   bank 2       mixed sizes, max pooling
//   bank NB-1    mixed sizes, average pooling
// The host then reads every result back and compares it with a direct convolution that models
// the 8-bit saturation of each crossbar and of the adders. Counted mechanisms: bus stalls,
// IDRC row-end flushes, vectors holding SP window positions (overlapped mapping), mixed-size
// runs and each pooling mode; one that never happens is a failure.

  localparam int BLK   = K * CIN;
  localparam int VLEN  = (SP - 1) * BLK + K * BLK;
  localparam int PPR   = (WD + 1) / SP;           // pushes per row strip
  localparam int NPUSH = (H - K + 1) * PPR;
  localparam int VPR   = (WD - K + 1) / SP;       // vectors per row strip
  localparam int NRES  = (H - K + 1) * VPR;
  localparam int NOUT  = SP * COUT;                // lanes used per vector
  localparam int SPLIT = (VLEN > SM) ? SM : 8;     // rows held by the medium crossbar
  localparam int NSMALL = (NOUT + SS - 1) / SS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid [NB], instr_ready [NB], busy [NB], done [NB];
  instr_t instr;
  elem_t instr_wdata [SL];
  logic host_req = 1'b0, host_we = 1'b0, host_gnt, host_rvalid;
  logic [AW-1:0] host_addr = '0;
  elem_t host_wdata [LANES], host_rdata [LANES];
  int checks = 0, failures = 0;
  int stalls = 0, flushes = 0, omm_vectors = 0, mixed_runs = 0, pool_runs [4];

  always #5 clk = ~clk;

  int fmap [H][WD][CIN];
  int kern [COUT][K][K][CIN];

  function automatic int sat(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // weight of merged-vector row r for output lane p*COUT+z
  function automatic int wt(input int r, input int lane);
    int p, z, col, rem;
    if (lane >= NOUT) return 0;
    p = lane / COUT; z = lane % COUT;
    col = r / BLK - p;
    rem = r % BLK;
    if (col < 0 || col >= K) return 0;
    return kern[z][col][rem / CIN][rem % CIN];
  endfunction

  function automatic int vec_elem(input int y, input int v, input int r);
    // element r of the merged vector of strip y, vector v: window columns from 2v
    int col, rem;
    col = v * SP + r / BLK;
    rem = r % BLK;
    return fmap[y + rem / CIN][col][rem % CIN];
  endfunction

  task automatic issue(input int b, input instr_t i);
    instr <= i;
    instr_valid[b] <= 1'b1;
    @(posedge clk);
    instr_valid[b] <= 1'b0;
    #1;
  endtask

  task automatic program_xb(input int b, input int pea, input int xb, input int row0,
                            input int nrows, input int lane0, input int s);
    for (int r = 0; r < nrows; r++) begin
      instr_t i;
      i = '0;
      i.op = OP_WR_ROW; i.pea = 2'(pea); i.xb = 6'(xb); i.row = 9'(r);
      for (int c = 0; c < SL; c++) instr_wdata[c] = (c < s) ? elem_t'(wt(row0 + r, lane0 + c)) : elem_t'(0);
      issue(b, i);
    end
  endtask

  task automatic route(input int b, input int pea, input int xb, input int seg, input int off);
    instr_t i;
    i = '0;
    i.op = OP_CFG_XB; i.pea = 2'(pea); i.xb = 6'(xb);
    i.xb_cfg.en = 1'b1; i.xb_cfg.in_seg = 7'(seg); i.xb_cfg.out_off = 2'(off);
    issue(b, i);
  endtask

  task automatic layer(input int b, input dest_e dest, input pool_mode_e pm, input int wb);
    instr_t i;
    i = '0;
    i.op = OP_CFG_LAYER;
    i.layer.vec_len = 15'(VLEN);
    i.layer.push_len = 10'(SP * BLK);
    i.layer.row_pushes = 16'(PPR);
    i.layer.n_push = 16'(NPUSH);
    i.layer.rd_base = '0;
    i.layer.wr_base = AW'(wb);
    i.layer.dest = dest;
    i.layer.pool_mode = pm;
    issue(b, i);
  endtask

  task automatic mixed(input int b);
    program_xb(b, 1, 0, 0, SPLIT, 0, SM);
    route(b, 1, 0, 0, 0);
    for (int n = 0; n < NSMALL; n++) begin
      program_xb(b, 2, n, SPLIT, VLEN - SPLIT, n * SS, SS);
      route(b, 2, n, SPLIT / SS, n);
    end
    mixed_runs++;
  endtask

  task automatic host_write(input int a, input elem_t d [LANES]);
    host_req <= 1'b1; host_we <= 1'b1; host_addr <= AW'(a);
    foreach (d[l]) host_wdata[l] <= d[l];
    #1;
    while (!host_gnt) begin @(posedge clk); #1; end
    @(posedge clk);
    host_req <= 1'b0;
    #1;
  endtask

  task automatic host_read(input int a, output elem_t d [LANES]);
    host_req <= 1'b1; host_we <= 1'b0; host_addr <= AW'(a);
    #1;
    while (!host_gnt) begin @(posedge clk); #1; end
    @(posedge clk);
    host_req <= 1'b0;
    #1;
    d = host_rdata;
  endtask

  task automatic check_bank(input int wb, input bit split, input bit pool, input pool_mode_e pm);
    for (int y = 0; y < H - K + 1; y++)
      for (int v = 0; v < VPR; v++) begin
        int t [LANES], e [LANES];
        elem_t d [LANES];
        for (int l = 0; l < LANES; l++) begin
          int a0, a1;
          a0 = 0; a1 = 0;
          for (int r = 0; r < VLEN; r++)
            if (split && r >= SPLIT) a1 += vec_elem(y, v, r) * wt(r, l);
            else a0 += vec_elem(y, v, r) * wt(r, l);
          t[l] = split ? sat(sat(a0) + sat(a1)) : sat(a0);
        end
        for (int l = 0; l < LANES; l++) begin
          if (!pool) e[l] = t[l];
          else unique case (pm)
            POOL_NONE: e[l] = t[l];
            POOL_RELU: e[l] = (t[l] > 0) ? t[l] : 0;
            POOL_MAX: begin
              e[l] = 0;
              if (l < PG) for (int w = 0; w < PW; w++) if (t[l*PW+w] > e[l]) e[l] = t[l*PW+w];
            end
            POOL_AVG: begin
              int s;
              s = 0;
              if (l < PG) for (int w = 0; w < PW; w++) s += t[l*PW+w];
              e[l] = (l < PG) ? (s >>> $clog2(PW)) : 0;
            end
          endcase
        end
        host_read(wb + y * VPR + v, d);
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (int'(d[l]) != e[l]) begin
            failures++;
            if (failures < 20)
              $display("FAIL bank result @%0d lane %0d got %0d exp %0d", wb + y * VPR + v, l, d[l], e[l]);
          end
        end
        if (pool) pool_runs[int'(pm)]++;
      end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always_ff @(posedge clk) begin
    for (int m = 0; m < NB; m++)
      if (dut.u_bus.m_req[m] && !dut.u_bus.m_gnt[m]) stalls++;
    if (dut.g_bank[0].u_bank.row_end) flushes++;
    if (dut.g_bank[0].u_bank.vec_valid) omm_vectors++;
  end

  initial begin : main
    int t0;
    elem_t word [LANES];
    instr = '0;
    foreach (instr_valid[b]) instr_valid[b] = 1'b0;
    foreach (instr_wdata[c]) instr_wdata[c] = '0;
    foreach (host_wdata[c]) host_wdata[c] = '0;
    foreach (pool_runs[m]) pool_runs[m] = 0;
    foreach (fmap[y, x, k]) fmap[y][x][k] = $urandom_range(0, 2);
    foreach (kern[z, i, j, k]) kern[z][i][j][k] = ($urandom_range(0, 5) == 0) ? int'($urandom_range(0, 2)) - 1 : 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // feature map into the buffer: one word per push, strip by strip, a zero column first
    for (int y = 0; y < H - K + 1; y++)
      for (int p = 0; p < PPR; p++) begin
        foreach (word[l]) word[l] = '0;
        for (int cc = 0; cc < SP; cc++) begin
          int col;
          col = p * SP + cc - 1;
          for (int r = 0; r < BLK; r++)
            word[cc * BLK + r] = (col >= 0) ? elem_t'(fmap[y + r / CIN][col][r % CIN]) : elem_t'(0);
        end
        host_write(y * PPR + p, word);
      end

    program_xb(0, 0, 5, 0, VLEN, 0, SL);
    route(0, 0, 5, 0, 0);
    layer(0, DEST_BUS, POOL_NONE, 100);
    mixed(1); layer(1, DEST_POOL, POOL_RELU, 200);
    mixed(2); layer(2, DEST_POOL, POOL_MAX, 300);
    mixed(NB - 1); layer(NB - 1, DEST_POOL, POOL_AVG, 400);

    // start all four, then wait for all
    begin
      instr_t i;
      i = '0;
      i.op = OP_RUN;
      instr <= i;
      instr_valid[0] <= 1'b1; instr_valid[1] <= 1'b1; instr_valid[2] <= 1'b1; instr_valid[NB-1] <= 1'b1;
      @(posedge clk);
      foreach (instr_valid[b]) instr_valid[b] <= 1'b0;
    end
    t0 = 0;
    #1;
    while (busy[0] || busy[1] || busy[2] || busy[NB-1]) begin @(posedge clk); #1; t0++; end
    // four banks, one bus: each block is one read and each result one write
    checks++;
    if (t0 > 4 * (NPUSH + NRES) + 20) begin failures++; $display("FAIL runs took %0d cycles", t0); end
    $display("runs took %0d cycles for %0d bus transfers", t0, 4 * (NPUSH + NRES));

    check_bank(100, 1'b0, 1'b0, POOL_NONE);
    check_bank(200, 1'b1, 1'b1, POOL_RELU);
    check_bank(300, 1'b1, 1'b1, POOL_MAX);
    check_bank(400, 1'b1, 1'b1, POOL_AVG);

    checks++;
    if (stalls == 0 || flushes == 0 || omm_vectors == 0 || mixed_runs == 0 || pool_runs[1] == 0
        || pool_runs[2] == 0 || pool_runs[3] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("stalls=%0d flushes=%0d omm_vectors=%0d (x%0d positions) mixed_runs=%0d relu=%0d max=%0d avg=%0d",
             stalls, flushes, omm_vectors, SP, mixed_runs, pool_runs[1], pool_runs[2], pool_runs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

