// tb_hasip_lms: adaptive feedback cancellation on the hearing-aid ASIP.
//
// The program runs a feedback canceller: the loudspeaker signal u(n) passes
// a bulk delay (an address offset on its load), a DC zero (1 - z^-1) and a
// frozen-pole filter 1 / (1 - a z^-1), giving d(n). An 8-tap adaptive FIR
// on a circular delay line of d estimates the feedback v(n) in the
// microphone signal s(n); the error e(n) = s(n) - v(n) is stored, and the
// weights are updated with LMS, w += (mu*e) * d. The test scene's feedback
// path is the same delay and pre-filters followed by an unknown 8-tap FIR,
// so the weights can converge to that FIR. The delay line is indexed with
// MODADDI (step ORDER-1 walks backwards), the weights live in the local
// data memory and the delay line in the main one so every tap issues two
// loads in one bundle. The filter and update loops are hardware loops that
// take turns in the loop cache, so each is refilled on every sample; the
// per-sample loop is a software loop (BNZ).
//
// Checks: every stored error and the final weights bit-exactly against an
// integer model; the exact cycle count (59 cycles per sample plus set-up);
// loop cache fills and hits per sample; and that the canceller converges
// (error power over the last 64 samples far below the first 64).
module tb_hasip_lms;
  import hasip_pkg::*;
  import hasip_asm_pkg::*;

  localparam int ORDER = 8, NS = 480;
  localparam int XB = 0, UB = 16, EB = 512;   // main memory
  localparam int WB = 0, SB = 16;             // local memory
  localparam int MU = 32767;                  // just under 1.0 in Q1.15
  localparam int DLY = 2;                     // bulk delay of the reference
  localparam int POLE = 16384;                // frozen pole a = 0.5

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

  int checks = 0, failures = 0, n_fill = 0, n_hit = 0;
  instr_t prog [PM_DEPTH];

  always @(posedge clk) if (rst_n && busy) begin
    if (lc_fill) n_fill++;
    if (lc_hit) n_hit++;
  end

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
    int u [NS], s [NS], d [NS], f [ORDER], w [ORDER], x [ORDER], e, v, got, c, j, mue;
    longint acc, p0, p1, pr;
    int exp_cycles, t, ud, up, dp;

    // ---------------- program ----------------
    // r2 delay index, r3 tap index, r6 mu*e, r9 sample index, r11 zero,
    // r12 delay-line head, r13 ORDER, r16 mu, r17 samples left,
    // r19 DC-zero output, r20 previous u, r21 d, r22 a*d(n-1), r23 a
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = bundle(S(OP_LDI, 9), S(OP_LDI, 11), S(OP_LDI, 12));
    prog[1]  = bundle(S(OP_LDI, 13, 0, 0, 0, ORDER), S(OP_LDI, 16, 0, 0, 0, MU), S(OP_LDI, 17, 0, 0, 0, NS));
    prog[2]  = bundle(S(OP_LDI, 20), S(OP_LDI, 21), S(OP_LDI, 23, 0, 0, 0, POLE));
    // per sample: delayed reference and pre-filters
    prog[3]  = bundle(S(OP_LD, 8, 0, 9, 0, UB - DLY), S(OP_LD, 10, 0, 9, 0, SB), S(OP_MULA, 0, 0, 11, 11));
    prog[4]  = bundle(S(OP_SUB, 19, 0, 8, 20), S(OP_SFPMUL, 22, 0, 21, 23, 15), S(OP_ADDI, 20, 0, 8, 0, 0));
    prog[5]  = bundle(S(OP_ADD, 21, 0, 19, 22));
    // adaptive filter
    prog[6]  = bundle(S(OP_ST, 0, 0, 12, 21, XB), S(OP_LDI, 3), S(OP_ADDI, 2, 0, 12, 0, 0));
    prog[7]  = bundle('0, '0, '0, C(C_LOOP, 13, 2));
    prog[8]  = bundle(S(OP_LD, 1, 0, 2, 0, XB), S(OP_LD, 4, 0, 3, 0, WB));
    prog[9]  = bundle(S(OP_MODADDI, 2, 0, 2, 0, modi_imm(ORDER - 1, ORDER)), S(OP_ADDI, 3, 0, 3, 0, 1),
                      S(OP_MACA, 0, 0, 1, 4));
    prog[10] = bundle(S(OP_BSLICE, 14, 0, 0, 0, bs_imm(15, 16, 0, 0)));
    prog[11] = bundle(S(OP_SUB, 15, 0, 10, 14));
    // weight update
    prog[12] = bundle(S(OP_SFPMUL, 6, 0, 15, 16, 15), S(OP_LDI, 3), '0);
    prog[13] = bundle(S(OP_ST, 0, 0, 9, 15, EB), '0, S(OP_ADDI, 2, 0, 12, 0, 0), C(C_LOOP, 13, 4));
    prog[14] = bundle(S(OP_LD, 1, 0, 2, 0, XB), S(OP_LD, 4, 0, 3, 0, WB));
    prog[15] = bundle(S(OP_SFPMUL, 5, 0, 1, 6, 15));
    prog[16] = bundle(S(OP_ADD, 7, 0, 4, 5));
    prog[17] = bundle(S(OP_MODADDI, 2, 0, 2, 0, modi_imm(ORDER - 1, ORDER)), S(OP_ST, 0, 0, 3, 7, WB),
                      S(OP_ADDI, 3, 0, 3, 0, 1));
    prog[18] = bundle(S(OP_MODADDI, 12, 0, 12, 0, modi_imm(1, ORDER)), S(OP_ADDI, 9, 0, 9, 0, 1),
                      S(OP_ADDI, 17, 0, 17, 0, 16'hffff));
    prog[19] = bundle('0, '0, '0, C(C_BNZ, 17, 3));
    prog[20] = bundle('0, '0, '0, C(C_HALT));

    #22 rst_n = 1;
    for (int a = 0; a < 21; a++) begin
      @(negedge clk); pm_we = 1; pm_waddr = PM_AW'(a); pm_wdata = prog[a];
    end
    @(negedge clk); pm_we = 0;

    // ---------------- data: feedback path and signals ----------------
    foreach (f[k]) f[k] = int'($urandom % 13108) - 6554;   // |f| < 0.2
    foreach (x[k]) begin x[k] = 0; dm_write(0, XB + k, 0); end
    foreach (w[k]) begin w[k] = 0; dm_write(1, WB + k, 0); end
    for (int k = 1; k <= DLY; k++) dm_write(0, UB - k, 0);
    up = 0; dp = 0;
    for (int n = 0; n < NS; n++) begin
      u[n] = int'($urandom % 12000) - 6000;                 // |u| < 0.19
      // delay, DC zero and frozen pole, as the program computes them
      ud = n >= DLY ? u[n - DLY] : 0;
      pr = (longint'(dp) * POLE) >>> 15;
      if (pr > 32767) pr = 32767;
      if (pr < -32768) pr = -32768;
      d[n] = int'(sx16(int'(sx16(ud - up)) + pr));
      up = ud; dp = d[n];
      acc = 0;
      for (int k = 0; k < ORDER; k++) if (n - k >= 0) acc += longint'(f[k]) * d[n - k];
      s[n] = int'(acc >>> 15) + int'($urandom % 17) - 8;  // feedback plus a little noise
    end
    // u goes to main memory, s to local memory
    for (int n = 0; n < NS; n++) dm_write(0, UB + n, u[n]);
    for (int n = 0; n < NS; n++) dm_write(1, SB + n, s[n]);

    // ---------------- run ----------------
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (!done && t < 200000) begin @(negedge clk); t++; end
    exp_cycles = 3 + NS * 59 + 1;
    expect_eq(int'(cycles), exp_cycles, "cycle count");
    expect_eq(n_fill, NS * (2 + 4), "loop cache fills");
    expect_eq(n_hit, NS * ((ORDER - 1) * 2 + (ORDER - 1) * 4), "loop cache hits");

    // ---------------- model and compare ----------------
    c = 0;
    p0 = 0; p1 = 0;
    for (int n = 0; n < NS; n++) begin
      x[c] = d[n];
      acc = 0; j = c;
      for (int k = 0; k < ORDER; k++) begin
        acc += longint'(w[k]) * x[j];
        j = (j + ORDER - 1) % ORDER;
      end
      v = int'(sx16((acc & 64'hffff_ffff) >> 15));
      e = int'(sx16(s[n] - v));
      mue = int'((longint'(e) * MU) >>> 15);
      j = c;
      for (int k = 0; k < ORDER; k++) begin
        pr = (longint'(x[j]) * mue) >>> 15;
        if (pr > 32767) pr = 32767;
        if (pr < -32768) pr = -32768;
        w[k] = int'(sx16(w[k] + pr));
        j = (j + ORDER - 1) % ORDER;
      end
      c = (c + 1) % ORDER;
      dm_read(0, EB + n, got);
      expect_eq(got, e, $sformatf("e[%0d]", n));
      if (n < 64) p0 += longint'(e) * e;
      if (n >= NS - 64) p1 += longint'(e) * e;
    end
    for (int k = 0; k < ORDER; k++) begin
      dm_read(1, WB + k, got);
      expect_eq(got, w[k], $sformatf("w[%0d]", k));
    end
    $display("error power first 64: %0d, last 64: %0d", p0 / 64, p1 / 64);
    checks++;
    if (p1 * 20 > p0) begin failures++; $display("FAIL canceller did not converge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
