// tb_warp_unit: checks the all-pass section unit against a bit-exact
// integer model of w = x + lambda*w1, y = w1 - lambda*w (Q1.15, arithmetic
// shift), and checks that a section run as a recursive filter matches the
// real-valued first-order all-pass (z^-1 - lambda)/(1 - lambda z^-1)
// within a few LSB.
module tb_warp_unit;
  logic signed [15:0] state, x, lambda, out_state, out_y;
  int checks = 0, failures = 0;

  warp_unit dut (.state, .x, .lambda, .out_state, .out_y);

  function automatic int wrap16(longint v);
    return int'(16'(v)) > 32767 ? int'(16'(v)) - 65536 : int'(16'(v));
  endfunction
  function automatic longint floor_div(longint p);  // floor(p / 2^15)
    return p >>> 15;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ew, ey;
    real xr, x1r, yr, y1r, lam;
    // bit-exact random checks
    for (int i = 0; i < 4000; i++) begin
      state  = 16'($urandom);
      x      = 16'($urandom);
      lambda = 16'($urandom);
      #1;
      ew = wrap16(longint'(x) + floor_div(longint'(state) * longint'(lambda)));
      ey = wrap16(longint'(state) - floor_div(longint'(ew) * longint'(lambda)));
      checks++;
      if (int'(out_state) != ew || int'(out_y) != ey) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d x=%0d l=%0d got %0d/%0d exp %0d/%0d",
                                    state, x, lambda, out_state, out_y, ew, ey);
      end
    end
    // recursive all-pass against its difference equation
    lam = 0.5756;
    lambda = 16'(int'(lam * 32768.0));
    state = 0; x1r = 0.0; y1r = 0.0;
    for (int n = 0; n < 300; n++) begin
      x  = 16'(($urandom % 8192) - 4096);
      #1;
      xr = real'(x) / 32768.0;
      yr = -lam * xr + x1r + lam * y1r;
      checks++;
      if ((real'(out_y) / 32768.0 - yr) > 8.0/32768.0 ||
          (yr - real'(out_y) / 32768.0) > 8.0/32768.0) begin
        failures++;
        if (failures < 10) $display("FAIL allpass n=%0d got %0d exp %f", n, out_y, yr * 32768.0);
      end
      x1r = xr; y1r = yr;
      state = out_state;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
