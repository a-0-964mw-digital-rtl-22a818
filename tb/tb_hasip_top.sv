// tb_hasip_top: end-to-end test of the hearing-aid ASIP at its default
// size. The testbench assembles three programs, loads each with its data
// through the host ports, runs it and compares the data memories with an
// integer model computed here, and checks the exact cycle count (one
// bundle per cycle).
//
//  A  warped FIR filter (filterbank kernel): 16 samples through a chain of
//     16 all-pass sections with 17 taps, lambda = 0.5756, using WARP, a
//     load from each data memory in one bundle, MULA/MACA and BSLICE, in a
//     20-bundle hardware loop served from the loop cache after pass 1.
//     Also compared with a floating-point warped FIR.
//  B  circular delay line with two modulo-add indices (the adaptive
//     filter's delayed-input copy), 128 passes of a 2-bundle loop.
//  C  per-band noise-reduction/compression step for 17 bands: a-priori
//     SNR (PSNR), NORM and saturating SFPMUL, inside a software outer loop
//     (BNZ) that re-enters the cached loop, followed by an uncached loop of
//     34 bundles.
// Each mechanism (loop cache fill, loop cache hit, hit on re-entry,
// uncached loop, two loads in one bundle, modulo wrap, multiply
// saturation, taken branch, restart after done) is counted and must occur.
module tb_hasip_top;
  import hasip_pkg::*;
  import hasip_asm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic pm_we = 0, host_dm_sel = 0, host_dm_en = 0, host_dm_we = 0;
  logic [PM_AW-1:0] pm_waddr = 0;
  logic [IW-1:0] pm_wdata = 0;
  logic [DM_AW-1:0] host_dm_addr = 0;
  word_t host_dm_wdata = 0, host_dm_rdata;
  logic pm_fetch, lc_hit, lc_fill;
  logic [31:0] cycles;

  hasip_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fill = 0, n_hit = 0, n_pm = 0, n_dual = 0, n_wrap = 0, n_sat = 0, n_branch = 0;
  int n_reentry = 0, n_uncached = 0, n_restart = 0;
  instr_t prog [PM_DEPTH];

  always @(posedge clk) if (rst_n && busy) begin
    if (lc_fill) n_fill++;
    if (lc_hit) n_hit++;
    if (pm_fetch) n_pm++;
    if (dut.dm_req[0].en && dut.dm_req[1].en) n_dual++;
    if ((dut.instr.ctrl.cop == C_BNZ && dut.ctrl_val != '0) ||
        (dut.instr.ctrl.cop == C_BZ && dut.ctrl_val == '0)) n_branch++;
  end

  // ---------------- assembler ----------------
  task automatic B(int addr, slot_t s0, slot_t s1 = '0, slot_t s2 = '0, ctrl_t c = '0);
    prog[addr] = bundle(s0, s1, s2, c);
  endtask

  // ---------------- host access ----------------
  task automatic load_prog(int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk); pm_we = 1; pm_waddr = PM_AW'(a); pm_wdata = prog[a];
    end
    @(negedge clk); pm_we = 0;
  endtask
  task automatic dm_write(int sel, int addr, int data);
    @(negedge clk);
    host_dm_sel = sel[0]; host_dm_en = 1; host_dm_we = 1;
    host_dm_addr = DM_AW'(addr); host_dm_wdata = 16'(data);
    @(negedge clk); host_dm_en = 0; host_dm_we = 0;
  endtask
  task automatic dm_read(int sel, int addr, output int data);
    @(negedge clk);
    host_dm_sel = sel[0]; host_dm_en = 1; host_dm_we = 0; host_dm_addr = DM_AW'(addr);
    #1 data = int'($signed(host_dm_rdata));
    @(negedge clk); host_dm_en = 0;
  endtask
  task automatic run(int exp_cycles, string name);
    int t = 0;
    if (done) n_restart++;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done && t < 100000) begin @(negedge clk); t++; end
    checks++;
    if (!done || cycles != 32'(exp_cycles)) begin
      failures++;
      $display("FAIL %s: done=%0d cycles=%0d expected %0d", name, done, cycles, exp_cycles);
    end
  endtask
  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [16], g [17], yv, fill0, hit0;
    longint w [17], acc, p, wn, lam;
    real wr [17], pr, accr, lamr, wnr;
    int ob [8], dl [24];
    int ga [17], gg [17], gm [17], gk [17], v, xi, nrm, gs, t1, t2, cs;
    longint sm;
    int pm0;

    #22 rst_n = 1;

    // ================= A: warped FIR filter =================
    lamr = 0.5756;
    lam  = longint'(int'(lamr * 32768.0));
    foreach (prog[i]) prog[i] = '0;
    B(0, S(OP_LDI, 4), S(OP_LDI, 6, 0, 0, 0, 16), S(OP_LDI, 16));
    for (int k = 0; k < 5; k++)
      B(1 + k, S(OP_LDI, 17 + 3*k), S(OP_LDI, 18 + 3*k), S(OP_LDI, 19 + 3*k));
    B(6, S(OP_LDI, 7), '0, '0, C(C_LOOP, 6, 20));
    B(7, S(OP_LD, 1, 0, 4, 0, 0), S(OP_LD, 2, 0, 7, 0, 0));
    for (int k = 1; k <= 16; k++)
      B(7 + k, S(OP_WARP, 15 + k, 1, 15 + k, 1, int'(lam)), S(OP_LD, 2, 0, 7, 0, k),
            S(k == 1 ? OP_MULA : OP_MACA, 0, 0, 1, 2));
    B(24, S(OP_ADDI, 4, 0, 4, 0, 1), '0, S(OP_MACA, 0, 0, 1, 2));
    B(25, S(OP_BSLICE, 5, 0, 0, 0, bs_imm(15, 16, 0, 0)));
    B(26, S(OP_ST, 0, 0, 4, 5, 63));
    B(27, '0, '0, '0, C(C_HALT));
    load_prog(28);
    for (int n = 0; n < 16; n++) begin x[n] = int'($urandom % 4096) - 2048; dm_write(0, n, x[n]); end
    for (int k = 0; k < 17; k++) begin g[k] = int'($urandom % 8192) - 4096; dm_write(1, k, g[k]); end
    fill0 = n_fill; hit0 = n_hit;
    run(7 + 20 * 16 + 1, "warped FIR");
    expect_eq(n_fill - fill0, 20, "A loop cache fills");
    expect_eq(n_hit - hit0, 20 * 15, "A loop cache hits");
    foreach (w[k]) begin w[k] = 0; wr[k] = 0.0; end
    for (int n = 0; n < 16; n++) begin
      p = x[n]; acc = longint'(g[0]) * p;
      pr = real'(x[n]) / 32768.0; accr = real'(g[0]) / 32768.0 * pr;
      for (int k = 1; k <= 16; k++) begin
        wn = sx16(p + ((w[k] * lam) >>> 15));
        p  = sx16(w[k] - ((wn * lam) >>> 15));
        w[k] = wn;
        acc += longint'(g[k]) * p;
        wnr = pr + lamr * wr[k];
        pr  = wr[k] - lamr * wnr;
        wr[k] = wnr;
        accr += real'(g[k]) / 32768.0 * pr;
      end
      dm_read(0, 64 + n, yv);
      expect_eq(yv, int'(sx16((acc & 64'hffff_ffff) >> 15)), $sformatf("A y[%0d]", n));
      checks++;
      if (real'(yv) / 32768.0 - accr > 40.0/32768.0 || accr - real'(yv) / 32768.0 > 40.0/32768.0) begin
        failures++;
        $display("FAIL A y[%0d]=%0d far from float %f", n, yv, accr * 32768.0);
      end
    end

    // ================= B: circular delay line =================
    foreach (prog[i]) prog[i] = '0;
    B(0, S(OP_LDI, 2), S(OP_LDI, 3), S(OP_LDI, 8, 0, 0, 0, 128));
    B(1, '0, '0, '0, C(C_LOOP, 8, 2));
    B(2, S(OP_LD, 1, 0, 2, 0, 128));
    B(3, S(OP_MODADDI, 3, 0, 3, 0, 1 | (24 << 6)), S(OP_ST, 0, 0, 3, 1, 256),
         S(OP_MODADDI, 2, 0, 2, 0, 1 | (8 << 6)));
    B(4, '0, '0, '0, C(C_HALT));
    load_prog(5);
    for (int j = 0; j < 8; j++) begin ob[j] = int'($urandom % 65536) - 32768; dm_write(0, 128 + j, ob[j]); end
    for (int j = 0; j < 24; j++) begin dl[j] = j; dm_write(1, 256 + j, j); end
    run(2 + 2 * 128 + 1, "circular buffer");
    for (int t = 0; t < 128; t++) begin
      dl[t % 24] = ob[t % 8];
      if (t % 24 == 23) n_wrap++;
      if (t % 8 == 7) n_wrap++;
    end
    for (int j = 0; j < 24; j++) begin dm_read(1, 256 + j, v); expect_eq(v, dl[j], $sformatf("B delay[%0d]", j)); end

    // ================= C: per-band SNR, norm, gain =================
    foreach (prog[i]) prog[i] = '0;
    B(0, S(OP_LDI, 20, 0, 0, 0, 2), S(OP_LDI, 6, 0, 0, 0, 17));
    B(1, S(OP_LDI, 10), '0, '0, C(C_LOOP, 6, 5));
    B(2, S(OP_LD, 11, 0, 10, 0, 256), S(OP_LD, 12, 0, 10, 0, 512));
    B(3, S(OP_LD, 13, 0, 10, 0, 288), S(OP_LD, 14, 0, 10, 0, 544));
    B(4, '0, '0, S(OP_PSNR, 15, 0, 11, 13, (12 << 17) | 15));
    B(5, S(OP_ST, 0, 0, 10, 15, 320), S(OP_SFPMUL, 5, 0, 15, 14, 10), S(OP_NORM, 3, 0, 15));
    B(6, S(OP_ST, 0, 0, 10, 5, 352), S(OP_ST, 0, 0, 10, 3, 576), S(OP_ADDI, 10, 0, 10, 0, 1));
    B(7, S(OP_ADDI, 20, 0, 20, 0, 16'hffff));
    B(8, '0, '0, '0, C(C_BNZ, 20, 1));
    B(9, S(OP_LDI, 9), S(OP_LDI, 6, 0, 0, 0, 3), S(OP_LDI, 7));
    B(10, '0, '0, '0, C(C_LOOP, 6, 34));
    B(11, S(OP_ADDI, 9, 0, 9, 0, 1));
    B(45, S(OP_ST, 0, 0, 7, 9, 400));
    B(46, '0, '0, '0, C(C_HALT));
    load_prog(47);
    for (int k = 0; k < 17; k++) begin
      ga[k] = int'($urandom % 32768);              // previous gain, Q1.15
      gg[k] = int'($urandom % 8192);               // G * gamma_prev, Q4.11
      gm[k] = int'($urandom % 16384) - 2048;       // gamma - 1, Q4.11
      gk[k] = int'($urandom % 32768);              // compression gain
      dm_write(0, 256 + k, ga[k]); dm_write(0, 288 + k, gg[k]);
      dm_write(1, 512 + k, gm[k]); dm_write(1, 544 + k, gk[k]);
    end
    fill0 = n_fill; hit0 = n_hit;
    begin
      pm0 = n_pm;
      run(1 + 2 * (1 + 17 * 5 + 2) + 2 + 34 * 3 + 2, "band loop");
      // outer loop runs twice; the second entry of the band loop is all hits
      expect_eq(n_fill - fill0, 5, "C loop cache fills");
      expect_eq(n_hit - hit0, 16 * 5 + 17 * 5, "C loop cache hits");
      if (n_hit - hit0 == 16 * 5 + 17 * 5) n_reentry++;
      // the 34-bundle loop comes from program memory every pass
      if (n_pm - pm0 >= 34 * 3) n_uncached++;
    end
    for (int k = 0; k < 17; k++) begin
      t1 = int'(sx16((longint'(PSNR_K1) * ga[k]) >>> 15));
      t2 = int'(sx16((longint'(PSNR_K1) * gg[k]) >>> 15));
      cs = gm[k] > 0 ? gm[k] : 0;
      sm = (longint'(t1) * t2 + longint'(PSNR_K2) * cs) >>> 15;
      xi = sm > 32767 ? 32767 : int'(sm);
      nrm = 0;
      for (int b = 14; b >= 0; b--) begin if (((xi >> b) & 1) != ((xi >> 15) & 1)) break; nrm++; end
      sm = (longint'(xi) * gk[k]) >>> 10;
      if (sm > 32767) begin gs = 32767; n_sat++; end else gs = int'(sm);
      dm_read(0, 320 + k, v); expect_eq(v, xi, $sformatf("C xi[%0d]", k));
      dm_read(1, 576 + k, v); expect_eq(v, nrm, $sformatf("C norm[%0d]", k));
      dm_read(0, 352 + k, v); expect_eq(v, gs, $sformatf("C gain[%0d]", k));
    end
    dm_read(0, 400, v); expect_eq(v, 3, "C uncached loop count");

    // ---------------- every mechanism must have happened ----------------
    $display("mechanisms: fill=%0d hit=%0d reentry=%0d uncached=%0d dual=%0d wrap=%0d sat=%0d branch=%0d restart=%0d",
             n_fill, n_hit, n_reentry, n_uncached, n_dual, n_wrap, n_sat, n_branch, n_restart);
    expect_eq(n_fill > 0, 1, "loop cache fill happened");
    expect_eq(n_hit > 0, 1, "loop cache hit happened");
    expect_eq(n_reentry > 0, 1, "re-entry hit happened");
    expect_eq(n_uncached > 0, 1, "uncached loop happened");
    expect_eq(n_dual > 0, 1, "dual-memory bundle happened");
    expect_eq(n_wrap > 0, 1, "modulo wrap happened");
    expect_eq(n_sat > 0, 1, "saturation happened");
    expect_eq(n_branch > 0, 1, "taken branch happened");
    expect_eq(n_restart > 0, 1, "restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
