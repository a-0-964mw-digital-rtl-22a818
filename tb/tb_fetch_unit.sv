// tb_fetch_unit: runs a control-flow program through the fetch unit with a
// behavioural program memory and register values, and checks, cycle by
// cycle, the program counter, where each bundle comes from (program memory
// or loop cache) and that the bundle is the right one. The program covers
// jumps, taken and untaken branches, a cached loop (filled on pass 1, hit
// on passes 2-3), an uncached 40-bundle loop, a skipped zero-count loop,
// and a cached loop re-entered from a software branch, which must hit from
// its first pass. One bundle per cycle: the run must take exactly as many
// cycles as bundles are executed.
module tb_fetch_unit;
  import hasip_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, running, done, pm_re, lc_hit, lc_fill;
  logic [PM_AW-1:0] pc;
  instr_t pm_rdata, instr, prog [PM_DEPTH];
  word_t  ctrl_val;
  word_t  regval [32];
  int checks = 0, failures = 0;
  int exp_pc [$];
  bit exp_hit [$];
  int hits = 0, fills = 0, reentry_hits = 0;

  fetch_unit dut (.*);

  always #5 clk = ~clk;
  assign pm_rdata = pm_re ? prog[pc] : '0;
  assign ctrl_val = regval[instr.ctrl.r];

  function automatic instr_t mk(cop_e cop, int r, int tgt, int addr);
    instr_t i = '0;
    i.ctrl.cop = cop; i.ctrl.r = 5'(r); i.ctrl.tgt = 8'(tgt);
    i.slot[0].imm = 22'(addr) | 22'h1000;
    return i;
  endfunction

  task automatic push(int a, bit h);
    exp_pc.push_back(a); exp_hit.push_back(h);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    bit seen56;
    for (int a = 0; a < PM_DEPTH; a++) prog[a] = mk(C_NOP, 0, 0, a);
    foreach (regval[i]) regval[i] = '0;
    regval[1] = 3; regval[2] = 0; regval[3] = 2; regval[4] = 1;
    prog[0]  = mk(C_LOOP, 1, 2, 0);
    prog[3]  = mk(C_JMP, 0, 5, 3);
    prog[4]  = mk(C_HALT, 0, 0, 4);
    prog[5]  = mk(C_BNZ, 2, 9, 5);
    prog[6]  = mk(C_BZ, 2, 8, 6);
    prog[7]  = mk(C_HALT, 0, 0, 7);
    prog[8]  = mk(C_LOOP, 3, 40, 8);
    prog[49] = mk(C_LOOP, 0, 3, 49);
    prog[53] = mk(C_LOOP, 1, 2, 53);
    prog[56] = mk(C_BNZ, 4, 53, 56);
    prog[57] = mk(C_HALT, 0, 0, 57);
    // expected trace: pc and whether the bundle comes from the loop cache
    push(0, 0);
    for (int p = 0; p < 3; p++) begin push(1, p > 0); push(2, p > 0); end
    push(3, 0); push(5, 0); push(6, 0); push(8, 0);
    for (int p = 0; p < 2; p++) for (int a = 9; a <= 48; a++) push(a, 0);
    push(49, 0);
    for (int e = 0; e < 2; e++) begin
      push(53, 0);
      for (int p = 0; p < 3; p++) begin push(54, e > 0 || p > 0); push(55, e > 0 || p > 0); end
      push(56, 0);
    end
    push(57, 0);

    #12 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n = 0;
    while (running && n < 1000) begin
      checks++;
      if (n >= exp_pc.size() || int'(pc) != exp_pc[n] || lc_hit != exp_hit[n] ||
          instr.slot[0].imm != (22'(pc) | 22'h1000) || pm_re == lc_hit) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d pc=%0d hit=%0d exp pc=%0d hit=%0d", n, pc, lc_hit,
                                    n < exp_pc.size() ? exp_pc[n] : -1, n < exp_pc.size() ? exp_hit[n] : 0);
      end
      if (lc_hit) hits++;
      if (lc_fill) fills++;
      if (lc_hit && pc == 54 && regval[4] == 0) reentry_hits++;
      seen56 = (pc == 56);
      @(negedge clk);
      if (seen56) regval[4] = 0;
      n++;
    end
    checks++; if (n != exp_pc.size()) begin failures++; $display("FAIL ran %0d cycles, exp %0d", n, exp_pc.size()); end
    checks++; if (!done) failures++;
    checks++; if (hits != 14 || fills != 4) begin failures++; $display("FAIL hits %0d fills %0d", hits, fills); end
    checks++; if (reentry_hits != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
