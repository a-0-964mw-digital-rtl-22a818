// tb_psnr_unit: random operands against an integer model of
// sat16(((k1*a>>>15)*(k1*b>>>15) + k2*max(c,floor)) >>> shamt), and a
// real-valued check of the decision-directed a-priori SNR with alpha=0.98.
module tb_psnr_unit;
  logic signed [15:0] a, b, c, k1, k2, floor_v, out;
  logic [4:0] shamt;
  int checks = 0, failures = 0;

  psnr_unit dut (.a, .b, .c, .k1, .k2, .floor_v, .shamt, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t1, t2, cs, s, e;
    real g, gp, gam, xi;
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      k1 = 16'($urandom); k2 = 16'($urandom); floor_v = 16'($urandom % 2000);
      shamt = 5'($urandom);
      #1;
      t1 = (longint'(k1) * longint'(a)) >>> 15;
      t2 = (longint'(k1) * longint'(b)) >>> 15;
      t1 = longint'(16'(t1)); if (t1 > 32767) t1 -= 65536;
      t2 = longint'(16'(t2)); if (t2 > 32767) t2 -= 65536;
      cs = (c > floor_v) ? longint'(c) : longint'(floor_v);
      s  = (t1 * t2 + longint'(k2) * cs) >>> shamt;
      e  = s > 32767 ? 32767 : (s < -32768 ? -32768 : s);
      checks++;
      if (longint'(out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", out, e);
      end
    end
    // xi = 0.98*G^2*gamma_prev + 0.02*max(gamma-1,0); values in Q4.11,
    // G in Q1.15, output shift 15 gives Q4.11.
    k1 = 16'sd32438; k2 = 16'sd655; floor_v = 0; shamt = 15;
    for (int i = 0; i < 200; i++) begin
      g   = real'($urandom % 32768) / 32768.0;
      gp  = real'($urandom % 8192) / 2048.0;        // gamma_prev in [0,4)
      gam = real'($urandom % 16384) / 2048.0 - 1.0; // gamma-1 in [-1,7)
      a = 16'(int'(g * 32768.0));
      b = 16'(int'(g * gp * 2048.0));
      c = 16'(int'(gam * 2048.0));
      #1;
      xi = 0.98 * g * g * gp + 0.02 * (gam > 0.0 ? gam : 0.0);
      checks++;
      if (real'(out) / 2048.0 - xi > 4.0/2048.0 || xi - real'(out) / 2048.0 > 4.0/2048.0) begin
        failures++;
        if (failures < 10) $display("FAIL real got %f exp %f", real'(out)/2048.0, xi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
