// tb_hasip_bmf: two-microphone adaptive beamformer on the hearing-aid ASIP.
//
// The program is a generalized sidelobe canceller. Each microphone sample
// passes a steering delay (a fixed address offset on the load, equal for
// both microphones because the wanted talker is straight ahead). The fixed
// beam is yf = (s1 + s2) / 2 and the blocking path s' = s1 - s2 cancels the
// frontal talker, leaving only the interference. An 8-tap adaptive FIR on a
// circular delay line of s' estimates the interference left in yf; the beam
// output is y = yf - ya, and the taps follow LMS: A += (mu*y) * s'.
// Microphone 1 is read from the main data memory and microphone 2 from the
// local one in the same bundle; the taps live in local memory and the delay
// line in main memory, so each tap issues two loads at once. The filter and
// update loops are hardware loops that take turns in the loop cache.
//
// The test scene: a slow tone from the front reaches both microphones
// alike; a noise source from the side reaches microphone 1 directly and
// microphone 2 one sample later at half the level.
//
// Checks: every output sample and the final taps bit-exactly against an
// integer model; the exact cycle count (58 cycles per sample plus set-up);
// loop cache fills and hits; and that the interference left in y over the
// last 64 samples is far below that over the first 64.
module tb_hasip_bmf;
  import hasip_pkg::*;
  import hasip_asm_pkg::*;

  localparam int ORDER = 8, NS = 480;
  localparam int XB = 0, UB = 16, EB = 512;   // main memory
  localparam int WB = 0, SB = 16;             // local memory
  localparam int MU = 24576;                  // 0.75 in Q1.15
  localparam int D = 1;                       // steering delay, both microphones

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
    int s1 [NS], s2 [NS], tg [NS], ni [NS], yf, w [ORDER], x [ORDER], e, v, got, c, j, mue;
    longint acc, p0, p1, pr;
    int exp_cycles, t;

    // ---------------- program ----------------
    // r2 delay index, r3 tap index, r6 mu*y, r8/r10 microphones, r9 sample
    // index, r11 zero, r12 delay-line head, r13 ORDER, r16 mu, r17 samples
    // left, r18 fixed beam, r19 blocking path
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = bundle(S(OP_LDI, 9), S(OP_LDI, 11), S(OP_LDI, 12));
    prog[1]  = bundle(S(OP_LDI, 13, 0, 0, 0, ORDER), S(OP_LDI, 16, 0, 0, 0, MU), S(OP_LDI, 17, 0, 0, 0, NS));
    // per sample
    prog[2]  = bundle(S(OP_LD, 8, 0, 9, 0, UB - D), S(OP_LD, 10, 0, 9, 0, SB - D), S(OP_MULA, 0, 0, 11, 11));
    prog[3]  = bundle(S(OP_ADD, 18, 0, 8, 10), S(OP_SUB, 19, 0, 8, 10));
    prog[4]  = bundle(S(OP_ST, 0, 0, 12, 19, XB), S(OP_LDI, 3), S(OP_SRA, 18, 0, 18, 0, 1));
    prog[5]  = bundle(S(OP_ADDI, 2, 0, 12, 0, 0), '0, '0, C(C_LOOP, 13, 2));
    prog[6]  = bundle(S(OP_LD, 1, 0, 2, 0, XB), S(OP_LD, 4, 0, 3, 0, WB));
    prog[7]  = bundle(S(OP_MODADDI, 2, 0, 2, 0, modi_imm(ORDER - 1, ORDER)), S(OP_ADDI, 3, 0, 3, 0, 1),
                      S(OP_MACA, 0, 0, 1, 4));
    prog[8]  = bundle(S(OP_BSLICE, 14, 0, 0, 0, bs_imm(15, 16, 0, 0)));
    prog[9]  = bundle(S(OP_SUB, 15, 0, 18, 14));
    prog[10] = bundle(S(OP_SFPMUL, 6, 0, 15, 16, 15), S(OP_LDI, 3), '0);
    prog[11] = bundle(S(OP_ST, 0, 0, 9, 15, EB), '0, S(OP_ADDI, 2, 0, 12, 0, 0), C(C_LOOP, 13, 4));
    prog[12] = bundle(S(OP_LD, 1, 0, 2, 0, XB), S(OP_LD, 4, 0, 3, 0, WB));
    prog[13] = bundle(S(OP_SFPMUL, 5, 0, 1, 6, 15));
    prog[14] = bundle(S(OP_ADD, 7, 0, 4, 5));
    prog[15] = bundle(S(OP_MODADDI, 2, 0, 2, 0, modi_imm(ORDER - 1, ORDER)), S(OP_ST, 0, 0, 3, 7, WB),
                      S(OP_ADDI, 3, 0, 3, 0, 1));
    prog[16] = bundle(S(OP_MODADDI, 12, 0, 12, 0, modi_imm(1, ORDER)), S(OP_ADDI, 9, 0, 9, 0, 1),
                      S(OP_ADDI, 17, 0, 17, 0, 16'hffff));
    prog[17] = bundle('0, '0, '0, C(C_BNZ, 17, 2));
    prog[18] = bundle('0, '0, '0, C(C_HALT));

    #22 rst_n = 1;
    for (int a = 0; a < 19; a++) begin
      @(negedge clk); pm_we = 1; pm_waddr = PM_AW'(a); pm_wdata = prog[a];
    end
    @(negedge clk); pm_we = 0;

    // ---------------- data: the acoustic scene ----------------
    foreach (x[k]) begin x[k] = 0; dm_write(0, XB + k, 0); end
    foreach (w[k]) begin w[k] = 0; dm_write(1, WB + k, 0); end
    for (int k = 1; k <= D; k++) begin dm_write(0, UB - k, 0); dm_write(1, SB - k, 0); end
    for (int n = 0; n < NS; n++) begin
      tg[n] = int'($rtoi(300.0 * $sin(2.0 * 3.14159265 * n / 23.0)));   // talker
      ni[n] = int'($urandom % 24000) - 12000;                          // side noise
    end
    for (int n = 0; n < NS; n++) begin
      s1[n] = tg[n] + ni[n];
      s2[n] = tg[n] + ((n > 0 ? ni[n - 1] : 0) >>> 1);
    end
    for (int n = 0; n < NS; n++) dm_write(0, UB + n, s1[n]);
    for (int n = 0; n < NS; n++) dm_write(1, SB + n, s2[n]);

    // ---------------- run ----------------
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 0;
    while (!done && t < 200000) begin @(negedge clk); t++; end
    exp_cycles = 2 + NS * 58 + 1;
    expect_eq(int'(cycles), exp_cycles, "cycle count");
    expect_eq(n_fill, NS * (2 + 4), "loop cache fills");
    expect_eq(n_hit, NS * ((ORDER - 1) * 2 + (ORDER - 1) * 4), "loop cache hits");

    // ---------------- model and compare ----------------
    c = 0;
    p0 = 0; p1 = 0;
    for (int n = 0; n < NS; n++) begin
      // steering delay D on both inputs
      int a1, a2;
      a1 = n >= D ? s1[n - D] : 0;
      a2 = n >= D ? s2[n - D] : 0;
      yf = int'(sx16(a1 + a2)) >>> 1;
      x[c] = int'(sx16(a1 - a2));
      acc = 0; j = c;
      for (int k = 0; k < ORDER; k++) begin
        acc += longint'(w[k]) * x[j];
        j = (j + ORDER - 1) % ORDER;
      end
      v = int'(sx16((acc & 64'hffff_ffff) >> 15));
      e = int'(sx16(yf - v));
      mue = int'((longint'(e) * MU) >>> 15);
      if (mue > 32767) mue = 32767;
      if (mue < -32768) mue = -32768;
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
      expect_eq(got, e, $sformatf("y[%0d]", n));
      // interference left in the output: y against the delayed talker
      if (n >= D) begin
        if (n < 64 + D) p0 += longint'(e - tg[n - D]) * (e - tg[n - D]);
        if (n >= NS - 64) p1 += longint'(e - tg[n - D]) * (e - tg[n - D]);
      end
    end
    for (int k = 0; k < ORDER; k++) begin
      dm_read(1, WB + k, got);
      expect_eq(got, w[k], $sformatf("w[%0d]", k));
    end
    $display("interference power first 64: %0d, last 64: %0d", p0 / 64, p1 / 64);
    checks++;
    if (p1 * 20 > p0) begin failures++; $display("FAIL beamformer did not converge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
