// tb_sfpmul_unit: random and corner-case operands against an integer model
// of saturate16((a*b) >>> shamt).
module tb_sfpmul_unit;
  logic signed [15:0] a, b, out;
  logic [4:0] shamt;
  int checks = 0, failures = 0, sats = 0;

  sfpmul_unit dut (.a, .b, .shamt, .out);

  task automatic check1();
    longint p, e;
    #1;
    p = longint'(a) * longint'(b);
    e = p >>> shamt;
    if (e > 32767) begin e = 32767; sats++; end
    else if (e < -32768) begin e = -32768; sats++; end
    checks++;
    if (longint'(out) != e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d sh=%0d got %0d exp %0d", a, b, shamt, out, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = -16'sd32768; b = -16'sd32768; shamt = 15; check1();
    checks++; if (out != 16'sd32767) failures++;
    a = 16'sd16384; b = 16'sd16384; shamt = 15; check1();
    checks++; if (out != 16'sd8192) failures++;
    a = -16'sd3; b = 16'sd1; shamt = 1; check1();
    checks++; if (out != -16'sd2) failures++;   // floor(-1.5)
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom); b = 16'($urandom); shamt = 5'($urandom);
      check1();
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
