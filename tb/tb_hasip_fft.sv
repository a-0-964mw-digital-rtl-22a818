// tb_hasip_fft: 16-point radix-2 decimation-in-frequency FFT on the
// hearing-aid ASIP, the transform shared by noise reduction and dynamic
// range compression.
//
// The testbench generates straight-line code, butterfly by butterfly. Real
// parts live in the main data memory and imaginary parts in the local one,
// so each complex load or store is one bundle. Two software optimizations
// are used: the output is left in bit-reversed order (no re-order pass),
// and butterflies whose twiddle factor is W^0 = 1 or W^(N/4) = -j use no
// multiply and no twiddle constant (5 bundles instead of 8); that covers
// all butterflies of the last two stages. General twiddles are LDI
// immediates and the products use SFPMUL (Q1.15). Inputs are kept within
// +-1024 so no stage overflows without scaling.
//
// Checks: the result bit-exactly against an integer model of the same
// operations, against a floating-point DFT within 12 LSB, and the exact
// cycle count (one bundle per cycle).
module tb_hasip_fft;
  import hasip_pkg::*;
  import hasip_asm_pkg::*;

  localparam int N = 16;

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
  instr_t prog [PM_DEPTH];
  int na = 0;
  int n_triv = 0, n_negj = 0, n_gen = 0;

  task automatic emit(instr_t i);
    prog[na] = i;
    na++;
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
  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int sfp(int a, int b);   // SFPMUL with shift 15
    longint p = (longint'(a) * b) >>> 15;
    return p > 32767 ? 32767 : (p < -32768 ? -32768 : int'(p));
  endfunction

  function automatic int bitrev4(int k);
    return ((k & 1) << 3) | ((k & 2) << 1) | ((k & 4) >> 1) | ((k & 8) >> 3);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr [N], xi [N], mr [N], mi [N], wr [N/2], wi [N/2];
    int h, k, ia, ib, ar, ai, br, bi, dr, di, got, p;
    real fr, fi, ang;

    for (int t = 0; t < N/2; t++) begin
      wr[t] = int'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * t / N) + 0.5)));
      wi[t] = int'($rtoi($floor(-32767.0 * $sin(2.0 * 3.14159265358979 * t / N) + 0.5)));
    end

    // ---------------- generate the program ----------------
    foreach (prog[i]) prog[i] = '0;
    emit(bundle(S(OP_LDI, 0)));
    h = N / 2;
    for (int s = 0; s < 4; s++) begin
      for (int g = 0; g < N; g += 2 * h) begin
        for (int j = 0; j < h; j++) begin
          ia = g + j; ib = ia + h; k = j * (N / (2 * h));
          if (k == 0 || k == N / 4) begin
            emit(bundle(S(OP_LD, 1, 0, 0, 0, ia), S(OP_LD, 2, 0, 0, 0, ia)));
            emit(bundle(S(OP_LD, 3, 0, 0, 0, ib), S(OP_LD, 4, 0, 0, 0, ib)));
            if (k == 0) emit(bundle(S(OP_ADD, 5, 0, 1, 3), S(OP_ADD, 6, 0, 2, 4), S(OP_SUB, 7, 0, 1, 3)));
            else        emit(bundle(S(OP_ADD, 5, 0, 1, 3), S(OP_ADD, 6, 0, 2, 4), S(OP_SUB, 7, 0, 3, 1)));
            emit(bundle(S(OP_ST, 0, 0, 0, 5, ia), S(OP_ST, 0, 0, 0, 6, ia), S(OP_SUB, 8, 0, 2, 4)));
            // W^0: (dr, di); -j: (di, -dr)
            if (k == 0) begin emit(bundle(S(OP_ST, 0, 0, 0, 7, ib), S(OP_ST, 0, 0, 0, 8, ib))); n_triv++; end
            else        begin emit(bundle(S(OP_ST, 0, 0, 0, 8, ib), S(OP_ST, 0, 0, 0, 7, ib))); n_negj++; end
          end else begin
            emit(bundle(S(OP_LD, 1, 0, 0, 0, ia), S(OP_LD, 2, 0, 0, 0, ia), S(OP_LDI, 9, 0, 0, 0, wr[k])));
            emit(bundle(S(OP_LD, 3, 0, 0, 0, ib), S(OP_LD, 4, 0, 0, 0, ib), S(OP_LDI, 10, 0, 0, 0, wi[k])));
            emit(bundle(S(OP_ADD, 5, 0, 1, 3), S(OP_ADD, 6, 0, 2, 4), S(OP_SUB, 7, 0, 1, 3)));
            emit(bundle(S(OP_ST, 0, 0, 0, 5, ia), S(OP_ST, 0, 0, 0, 6, ia), S(OP_SUB, 8, 0, 2, 4)));
            emit(bundle(S(OP_SFPMUL, 11, 0, 7, 9, 15), S(OP_SFPMUL, 12, 0, 8, 10, 15), S(OP_SFPMUL, 13, 0, 7, 10, 15)));
            emit(bundle(S(OP_SFPMUL, 14, 0, 8, 9, 15), S(OP_SUB, 15, 0, 11, 12)));
            emit(bundle(S(OP_ST, 0, 0, 0, 15, ib), S(OP_ADD, 16, 0, 13, 14)));
            emit(bundle('0, S(OP_ST, 0, 0, 0, 16, ib)));
            n_gen++;
          end
        end
      end
      h = h / 2;
    end
    emit(bundle('0, '0, '0, C(C_HALT)));

    #22 rst_n = 1;
    for (int a = 0; a < na; a++) begin
      @(negedge clk); pm_we = 1; pm_waddr = PM_AW'(a); pm_wdata = prog[a];
    end
    @(negedge clk); pm_we = 0;
    for (int n = 0; n < N; n++) begin
      xr[n] = int'($urandom % 2048) - 1024; xi[n] = int'($urandom % 2048) - 1024;
      mr[n] = xr[n]; mi[n] = xi[n];
      dm_write(0, n, xr[n]); dm_write(1, n, xi[n]);
    end

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int t = 0; t < 10000 && !done; t++) @(negedge clk);
    expect_eq(int'(done), 1, "done");
    expect_eq(int'(cycles), na, "cycle count (one bundle per cycle)");
    expect_eq(na, 1 + 5 * (n_triv + n_negj) + 8 * n_gen + 1, "bundle count");
    checks++;
    if (n_triv + n_negj != 22 || n_gen != 10) begin
      failures++; $display("FAIL butterfly mix %0d/%0d/%0d", n_triv, n_negj, n_gen);
    end

    // ---------------- integer model of the same program ----------------
    h = N / 2;
    for (int s = 0; s < 4; s++) begin
      for (int g = 0; g < N; g += 2 * h) begin
        for (int j = 0; j < h; j++) begin
          ia = g + j; ib = ia + h; k = j * (N / (2 * h));
          ar = mr[ia]; ai = mi[ia]; br = mr[ib]; bi = mi[ib];
          mr[ia] = int'(sx16(ar + br)); mi[ia] = int'(sx16(ai + bi));
          dr = int'(sx16(ar - br)); di = int'(sx16(ai - bi));
          if (k == 0) begin mr[ib] = dr; mi[ib] = di; end
          else if (k == N / 4) begin mr[ib] = di; mi[ib] = int'(sx16(br - ar)); end
          else begin
            mr[ib] = int'(sx16(sfp(dr, wr[k]) - sfp(di, wi[k])));
            mi[ib] = int'(sx16(sfp(dr, wi[k]) + sfp(di, wr[k])));
          end
        end
      end
      h = h / 2;
    end

    for (int kk = 0; kk < N; kk++) begin
      p = bitrev4(kk);
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = -2.0 * 3.14159265358979 * kk * n / N;
        fr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        fi += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
      dm_read(0, p, got);
      expect_eq(got, mr[p], $sformatf("Re X[%0d]", kk));
      checks++; if (got - fr > 12.0 || fr - got > 12.0) begin failures++; $display("FAIL Re X[%0d]=%0d float %f", kk, got, fr); end
      dm_read(1, p, got);
      expect_eq(got, mi[p], $sformatf("Im X[%0d]", kk));
      checks++; if (got - fi > 12.0 || fi - got > 12.0) begin failures++; $display("FAIL Im X[%0d]=%0d float %f", kk, got, fi); end
    end
    $display("FFT: %0d bundles, %0d W^0, %0d -j, %0d general butterflies", na, n_triv, n_negj, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
