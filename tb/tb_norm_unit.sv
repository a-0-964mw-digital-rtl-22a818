// tb_norm_unit: every 16-bit input against a count of the bits below the
// sign bit that equal it (scanning down from bit 14).
module tb_norm_unit;
  logic signed [15:0] x;
  logic [3:0] out;
  int checks = 0, failures = 0;

  norm_unit dut (.x, .out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      #1;
      e = 0;
      for (int k = 14; k >= 0; k--) begin
        if (x[k] != x[15]) break;
        e++;
      end
      checks++;
      if (int'(out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h got %0d exp %0d", x, out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
