// tb_resnet18_conv2: one bank at its full default size runs a slice of a ResNet-18 layer.
//
// Layer: the second convolution of ResNet-18: 3x3 kernels, 64 input and 64 output channels,
// stride 1, mapped with overlapped mapping at s_p = 3. The merged vector is
// (3-1)*1*3*64 + 3*3*64 = 960 elements and the outputs of 3 window positions x 64 channels
// take 192 lanes. The 960 rows are split over mixed crossbar sizes, as in the mixed-size
// mapping of this layer:
//   rows   0-511  one 512x512 crossbar (lanes 0-191)
//   rows 512-767  one 256x256 crossbar (lanes 0-191)
//   rows 768-959  four 128x128 crossbars, two row slices x two lane groups (0-127, 128-191)
// One window step brings 3 window columns (576 elements), more than the 512-lane bus carries,
// so each step takes two pushes of 288 elements (step_pushes = 2). Every row strip starts with
// one zero window column so that its first vector covers window positions 0-2.
// The feature map is a 5x8 slice (3 row strips, 6 positions each); the kernels are random.
// Results go through the ReLU. The reference computes each crossbar's partial sum, saturates
// it to 8 bits as the crossbar's ADC does, adds the partial sums and saturates again.
// With the bus always granted the run must finish within 2 cycles per push plus 8.
module tb_resnet18_conv2;
  import misca_pkg::*;
  localparam int SL = 512, L = 512, AW = GBUF_AW, MW = 64;
  localparam int K = 3, CIN = 64, COUT = 64, H = 5, WD = 8, SP = 3;
  localparam int BLK   = K * CIN;                       // elements per window column
  localparam int VLEN  = (SP - 1) * BLK + K * BLK;      // 960
  localparam int PLEN  = SP * BLK / 2;                  // 288 elements per push
  localparam int VPR   = (WD - K + 1) / SP;             // vectors per row strip
  localparam int PPR   = 2 * (VPR + 1);                 // pushes per row strip
  localparam int NSTR  = H - K + 1;
  localparam int NPUSH = NSTR * PPR;
  localparam int NRES  = NSTR * VPR;
  localparam int WB    = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid = 1'b0, instr_ready, busy, done;
  instr_t instr;
  elem_t instr_wdata [SL];
  logic bus_req, bus_we, bus_gnt, bus_rvalid = 1'b0;
  logic [AW-1:0] bus_addr;
  elem_t bus_wdata [L], bus_rdata [L];
  int checks = 0, failures = 0, flushes = 0, omm_vectors = 0, positive = 0;

  rram_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // global buffer model, always granting
  elem_t mem [MW][L];
  assign bus_gnt = bus_req;
  always_ff @(posedge clk) begin
    bus_rvalid <= bus_gnt && !bus_we;
    if (bus_gnt && !bus_we) bus_rdata <= mem[bus_addr % MW];
    if (bus_gnt && bus_we) mem[bus_addr % MW] <= bus_wdata;
    if (dut.row_end) flushes++;
    if (dut.vec_valid) omm_vectors++;
  end

  int fmap [H][WD][CIN];
  int kern [COUT][K][K][CIN];   // [z][window column][kernel row][channel]

  task automatic issue(input instr_t i);
    instr <= i;
    instr_valid <= 1'b1;
    @(posedge clk);
    instr_valid <= 1'b0;
    #1;
  endtask

  // weight of merged-vector row r for output lane p*COUT + z
  function automatic int wt(input int r, input int lane);
    int p, z, col, rem;
    if (lane >= SP * COUT) return 0;
    p = lane / COUT; z = lane % COUT;
    col = r / BLK - p;
    rem = r % BLK;
    if (col < 0 || col >= K) return 0;
    return kern[z][col][rem / CIN][rem % CIN];
  endfunction

  // element r of vector v of strip y
  function automatic int vin(input int y, input int v, input int r);
    int col, rem;
    col = v * SP + r / BLK;
    rem = r % BLK;
    return fmap[y + rem / CIN][col][rem % CIN];
  endfunction

  function automatic int sat(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  task automatic program_xb(input int pea, input int xb, input int row0, input int nrows,
                            input int lane0, input int s, input int seg);
    instr_t i;
    for (int r = 0; r < s; r++) begin
      i = '0;
      i.op = OP_WR_ROW; i.pea = 2'(pea); i.xb = 6'(xb); i.row = 9'(r);
      for (int c = 0; c < SL; c++)
        instr_wdata[c] = (r < nrows && c < s) ? elem_t'(wt(row0 + r, lane0 + c)) : elem_t'(0);
      issue(i);
    end
    i = '0;
    i.op = OP_CFG_XB; i.pea = 2'(pea); i.xb = 6'(xb);
    i.xb_cfg.en = 1'b1; i.xb_cfg.in_seg = 7'(seg); i.xb_cfg.out_off = 2'(lane0 / s);
    issue(i);
  endtask

  // crossbar row ranges and lane ranges of the mapping, for the reference
  localparam int NX = 6;
  int xr0 [NX] = '{0, 512, 768, 768, 896, 896};
  int xr1 [NX] = '{512, 768, 896, 896, 960, 960};
  int xl0 [NX] = '{0, 0, 0, 128, 0, 128};
  int xl1 [NX] = '{512, 256, 128, 256, 128, 256};

  initial begin
    instr_t i;
    int cyc;
    instr = '0;
    foreach (instr_wdata[c]) instr_wdata[c] = '0;
    for (int a = 0; a < MW; a++) foreach (mem[a][l]) mem[a][l] = '0;
    foreach (fmap[y, x, k]) fmap[y][x][k] = $urandom_range(0, 1);
    foreach (kern[z, c, j, k]) kern[z][c][j][k] = int'($urandom_range(0, 2)) - 1;
    // buffer layout: per strip a zero column, then the window columns, PLEN elements a word
    for (int y = 0; y < NSTR; y++)
      for (int e = 0; e < PPR * PLEN; e++) begin
        int col, rem;
        col = e / BLK - 1;
        rem = e % BLK;
        mem[y * PPR + e / PLEN][e % PLEN] =
          (col >= 0 && col < WD) ? elem_t'(fmap[y + rem / CIN][col][rem % CIN]) : elem_t'(0);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    program_xb(0, 5, 0, 512, 0, 512, 0);       // large: rows 0-511, slice 0 of 512
    program_xb(1, 9, 512, 256, 0, 256, 2);     // medium: rows 512-767, slice 2 of 256
    program_xb(2, 0, 768, 128, 0, 128, 6);     // small: rows 768-895, lanes 0-127
    program_xb(2, 1, 768, 128, 128, 128, 6);   //        lanes 128-255
    program_xb(2, 2, 896, 64, 0, 128, 7);      // small: rows 896-959, lanes 0-127
    program_xb(2, 3, 896, 64, 128, 128, 7);    //        lanes 128-255

    i = '0;
    i.op = OP_CFG_LAYER;
    i.layer.vec_len = 15'(VLEN);
    i.layer.push_len = 10'(PLEN);
    i.layer.step_pushes = 4'd2;
    i.layer.row_pushes = 16'(PPR);
    i.layer.n_push = 16'(NPUSH);
    i.layer.rd_base = '0;
    i.layer.wr_base = AW'(WB);
    i.layer.dest = DEST_POOL;
    i.layer.pool_mode = POOL_RELU;
    issue(i);
    i.op = OP_RUN;
    issue(i);
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc > 2 * NPUSH + 8) begin failures++; $display("FAIL run took %0d cycles", cyc); end
    $display("run took %0d cycles for %0d pushes", cyc, NPUSH);

    for (int y = 0; y < NSTR; y++)
      for (int v = 0; v < VPR; v++)
        for (int l = 0; l < L; l++) begin
          int acc, exp_v, n;
          acc = 0;
          for (int x = 0; x < NX; x++)
            if (l >= xl0[x] && l < xl1[x]) begin
              int part;
              part = 0;
              for (int r = xr0[x]; r < xr1[x]; r++) part += vin(y, v, r) * wt(r, l);
              acc += sat(part);
            end
          exp_v = sat(acc);
          if (exp_v < 0) exp_v = 0;
          n = y * VPR + v;
          if (exp_v > 0) positive++;
          checks++;
          if (int'(mem[WB + n][l]) != exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL result %0d lane %0d got %0d exp %0d", n, l, mem[WB + n][l], exp_v);
          end
        end

    checks++;
    if (flushes != NSTR || omm_vectors != NRES || positive < NRES * COUT) begin
      failures++;
      $display("FAIL flushes %0d vectors %0d positive %0d", flushes, omm_vectors, positive);
    end
    $display("flushes=%0d omm_vectors=%0d (x%0d positions) positive=%0d", flushes, omm_vectors, SP, positive);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
