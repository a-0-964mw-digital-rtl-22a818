// tb_bitslice_unit: random words and field controls against a bit-by-bit
// model of ((x >> rs) & rmask) + ((x & lmask) << ls), low 16 bits.
module tb_bitslice_unit;
  logic [31:0] x, rmask, lmask;
  logic [4:0]  rshift, lshift;
  logic [15:0] out;
  int checks = 0, failures = 0;

  bitslice_unit dut (.x, .rshift, .rmask, .lshift, .lmask, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned r, l, e;
    for (int i = 0; i < 5000; i++) begin
      x = $urandom; rshift = 5'($urandom); lshift = 5'($urandom);
      rmask = (i % 3 == 0) ? $urandom : (32'd1 << ($urandom % 32)) - 1;
      lmask = (i % 2 == 0) ? 32'd0 : (32'd1 << ($urandom % 32)) - 1;
      #1;
      r = 0; l = 0;
      for (int k = 0; k < 16; k++) begin
        if (k + int'(rshift) < 32 && rmask[k]) r = r + (int'(x[k + int'(rshift)]) << k);
        if (k - int'(lshift) >= 0 && lmask[k - int'(lshift)]) l = l + (int'(x[k - int'(lshift)]) << k);
      end
      e = (r + l) & 32'hffff;
      checks++;
      if (32'(out) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h rs=%0d ls=%0d got %h exp %h", x, rshift, lshift, out, e);
      end
    end
    // take bits 30..15 of a Q30 product
    x = 32'h3fff_8000; rshift = 15; rmask = 32'hffff; lshift = 0; lmask = 0; #1;
    checks++; if (out != 16'h7fff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
