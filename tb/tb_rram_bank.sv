// tb_rram_bank: runs a small convolution through one bank with overlapped mapping.
//
// Layer: 2x2 kernels, 2 input channels, 3 output channels, stride 1, on a 4x7 feature map.
// Each kernel is written twice into the crossbar columns, the second copy shifted down by one
// window column, so one merged vector of 3 window columns (12 elements) yields 2 output
// positions x 3 channels (6 lanes). Blocks of 2 window columns are fetched per push; each
// feature-map row strip starts with one zero column so the windows line up, and the IDRC
// flushes after the 4 pushes of a strip.
// Run 1 maps the kernels onto one large crossbar and sends sums straight to the bus.
// Runs 2-4 split the 12 rows over a medium crossbar (rows 0-7) and two small ones (rows 8-11,
// lanes 0-3 and 4-5), as mixed-size mapping does, and go through ReLU, max and average pooling.
// Results are compared with a direct convolution; the bus refuses grants at random in runs
// 2-4. Run 1 (bus always granted) must finish within 2 cycles per block plus a fixed latency.
module tb_rram_bank;
  import misca_pkg::*;
  localparam int SL = 16, SM = 8, SS = 4, N = 4, VL = 32, L = 16, PG = 2, PW = 4, AW = GBUF_AW;
  localparam int K = 2, CIN = 2, COUT = 3, H = 4, WD = 7, SP = 2;
  localparam int BLK = K * CIN;                 // elements per window column
  localparam int VLEN = (SP - 1) * BLK + K * BLK;
  localparam int PUSHES_PER_ROW = (WD + 1) / SP;
  localparam int NPUSH = (H - K + 1) * PUSHES_PER_ROW;
  localparam int NRES = (H - K + 1) * ((WD - K + 1) / SP);

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid = 1'b0, instr_ready, busy, done;
  instr_t instr;
  elem_t instr_wdata [SL];
  logic bus_req, bus_we, bus_gnt, bus_rvalid = 1'b0;
  logic [AW-1:0] bus_addr;
  elem_t bus_wdata [L], bus_rdata [L];
  int checks = 0, failures = 0;
  int stalls = 0, flushes = 0, pool_runs [4], mixed_runs = 0;

  rram_bank #(.SL(SL), .SM(SM), .SS(SS), .N_XB(N), .VEC_LEN(VL), .LANES(L),
              .POOL_GROUPS(PG), .POOL_WIN(PW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- global buffer model on the bank's bus port ----
  elem_t mem [2**AW][L];
  int gnt_pct = 100;
  assign bus_gnt = bus_req && ($urandom_range(1, 100) <= gnt_pct);
  always_ff @(posedge clk) begin
    bus_rvalid <= bus_gnt && !bus_we;
    if (bus_gnt && !bus_we) bus_rdata <= mem[bus_addr];
    if (bus_gnt && bus_we) mem[bus_addr] <= bus_wdata;
    if (bus_req && !bus_gnt) stalls++;
    if (dut.row_end) flushes++;
  end

  int fmap [H][WD][CIN];
  int kern [COUT][K][K][CIN];   // [z][col i][row j][channel]

  task automatic issue(input instr_t i);
    instr <= i;
    instr_valid <= 1'b1;
    @(posedge clk);
    instr_valid <= 1'b0;
    #1;
  endtask

  // weight of merged-vector row r for output lane (p*COUT + z)
  function automatic int wt(input int r, input int lane);
    int p, z, col, rem;
    p = lane / COUT; z = lane % COUT;
    if (lane >= SP * COUT) return 0;
    col = r / BLK - p;            // window column this row falls in, for copy p
    rem = r % BLK;
    if (col < 0 || col >= K) return 0;
    return kern[z][col][rem / CIN][rem % CIN];
  endfunction

  task automatic program_xb(input int pea, input int xb, input int row0, input int nrows,
                            input int lane0, input int s);
    for (int r = 0; r < s; r++) begin
      instr_t i;
      i = '0;
      i.op = OP_WR_ROW; i.pea = 2'(pea); i.xb = 6'(xb); i.row = 9'(r);
      for (int c = 0; c < SL; c++)
        instr_wdata[c] = (r < nrows && c < s) ? elem_t'(wt(row0 + r, lane0 + c)) : elem_t'(0);
      issue(i);
    end
  endtask

  task automatic route(input int pea, input int xb, input bit en, input int seg, input int off);
    instr_t i;
    i = '0;
    i.op = OP_CFG_XB; i.pea = 2'(pea); i.xb = 6'(xb);
    i.xb_cfg.en = en; i.xb_cfg.in_seg = 7'(seg); i.xb_cfg.out_off = 2'(off);
    issue(i);
  endtask

  task automatic run(input dest_e dest, input pool_mode_e pm, input int pct, input int wb);
    instr_t i;
    int cyc, res [NRES][L];
    i = '0;
    i.op = OP_CFG_LAYER;
    i.layer.vec_len = 15'(VLEN);
    i.layer.push_len = 10'(SP * BLK);
    i.layer.row_pushes = 16'(PUSHES_PER_ROW);
    i.layer.n_push = 16'(NPUSH);
    i.layer.rd_base = '0;
    i.layer.wr_base = AW'(wb);
    i.layer.dest = dest;
    i.layer.pool_mode = pm;
    issue(i);
    gnt_pct = pct;
    i.op = OP_RUN;
    issue(i);
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    if (pct == 100) begin
      checks++;
      if (cyc > 2 * NPUSH + 8) begin failures++; $display("FAIL run took %0d cycles", cyc); end
    end
    // reference
    for (int y = 0; y < H - K + 1; y++)
      for (int v = 0; v < (WD - K + 1) / SP; v++) begin
        int n;
        n = y * ((WD - K + 1) / SP) + v;
        for (int l = 0; l < L; l++) res[n][l] = 0;
        for (int p = 0; p < SP; p++)
          for (int z = 0; z < COUT; z++) begin
            int acc;
            acc = 0;
            for (int ci = 0; ci < K; ci++)
              for (int rj = 0; rj < K; rj++)
                for (int k = 0; k < CIN; k++)
                  acc += fmap[y + rj][v * SP + p + ci][k] * kern[z][ci][rj][k];
            res[n][p * COUT + z] = acc;
          end
        if (dest == DEST_POOL) begin
          int t [L];
          t = res[n];
          for (int l = 0; l < L; l++) begin
            unique case (pm)
              POOL_NONE: res[n][l] = t[l];
              POOL_RELU: res[n][l] = (t[l] > 0) ? t[l] : 0;
              POOL_MAX: begin
                res[n][l] = 0;
                if (l < PG) for (int w = 0; w < PW; w++) if (t[l*PW+w] > res[n][l]) res[n][l] = t[l*PW+w];
              end
              POOL_AVG: begin
                int s;
                s = 0;
                if (l < PG) for (int w = 0; w < PW; w++) s += t[l*PW+w];
                res[n][l] = (l < PG) ? (s >>> 2) : 0;
              end
            endcase
          end
          pool_runs[int'(pm)]++;
        end
        for (int l = 0; l < L; l++) begin
          checks++;
          if (int'(mem[wb + n][l]) != res[n][l]) begin
            failures++;
            $display("FAIL result %0d lane %0d got %0d exp %0d", n, l, mem[wb + n][l], res[n][l]);
          end
        end
      end
  endtask

  initial begin
    instr = '0;
    foreach (instr_wdata[c]) instr_wdata[c] = '0;
    foreach (pool_runs[m]) pool_runs[m] = 0;
    for (int a = 0; a < 2**AW; a++) foreach (mem[a][l]) mem[a][l] = '0;
    foreach (fmap[y, x, k]) fmap[y][x][k] = $urandom_range(0, 3);
    foreach (kern[z, i, j, k]) kern[z][i][j][k] = int'($urandom_range(0, 4)) - 2;
    // buffer layout: one word per push, a zero column then the window columns of the strip
    for (int y = 0; y < H - K + 1; y++)
      for (int p = 0; p < PUSHES_PER_ROW; p++)
        for (int cc = 0; cc < SP; cc++) begin
          int col;
          col = p * SP + cc - 1;
          for (int rj = 0; rj < K; rj++)
            for (int k = 0; k < CIN; k++)
              mem[y * PUSHES_PER_ROW + p][cc * BLK + rj * CIN + k] =
                (col >= 0) ? elem_t'(fmap[y + rj][col][k]) : elem_t'(0);
        end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // run 1: one large crossbar
    program_xb(0, 1, 0, VLEN, 0, SL);
    route(0, 1, 1'b1, 0, 0);
    run(DEST_BUS, POOL_NONE, 100, 100);
    route(0, 1, 1'b0, 0, 0);

    // runs 2-4: medium crossbar for rows 0-7, two small ones for rows 8-11
    program_xb(1, 0, 0, 8, 0, SM);
    program_xb(2, 2, 8, 4, 0, SS);
    program_xb(2, 3, 8, 4, 4, SS);
    route(1, 0, 1'b1, 0, 0);
    route(2, 2, 1'b1, 2, 0);
    route(2, 3, 1'b1, 2, 1);
    mixed_runs++;
    run(DEST_POOL, POOL_RELU, 60, 200);
    run(DEST_POOL, POOL_MAX, 60, 300);
    run(DEST_POOL, POOL_AVG, 60, 400);

    checks++;
    if (stalls == 0 || flushes == 0 || mixed_runs == 0 || pool_runs[1] == 0 || pool_runs[2] == 0
        || pool_runs[3] == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: stalls %0d flushes %0d", stalls, flushes);
    end
    $display("stalls=%0d flushes=%0d", stalls, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
