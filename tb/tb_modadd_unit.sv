// tb_modadd_unit: circular-buffer steps (a < m, b <= m) against (a+b) % m,
// and a full walk of an index around a buffer of length 24.
module tb_modadd_unit;
  logic [15:0] a, b, m, out;
  int checks = 0, failures = 0;

  modadd_unit dut (.a, .b, .m, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e, idx;
    for (int i = 0; i < 5000; i++) begin
      m = 16'(($urandom % 65535) + 1);
      a = 16'($urandom % m);
      b = 16'($urandom % (32'(m) + 1));
      #1;
      e = (32'(a) + 32'(b)) % 32'(m);
      checks++;
      if (32'(out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d m=%0d got %0d exp %0d", a, b, m, out, e);
      end
    end
    idx = 0; m = 24; b = 1;
    for (int i = 0; i < 100; i++) begin
      a = 16'(idx); #1;
      idx = (idx + 1) % 24;
      checks++;
      if (32'(out) != idx) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
