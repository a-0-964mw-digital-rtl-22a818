// tb_issue_slot: random slot words of every opcode with random operands,
// compared against an integer model of each operation: the register
// writes (enable, address, data), the accumulator write and the memory
// request. Run for a slot with a load/store unit and one without.
module tb_issue_slot;
  import hasip_pkg::*;

  slot_t   s;
  word_t   a, b, c, mem_rdata;
  acc_t    acc_s, acc_d;
  rf_wr_t  w1 [2], w2 [2];
  acc_wr_t aw [2];
  dm_req_t mreq [2];
  int checks = 0, failures = 0;

  issue_slot #(.HAS_LSU(1'b1)) dut_lsu (.s, .a, .b, .c, .acc_s, .acc_d, .mem_rdata,
    .w1(w1[0]), .w2(w2[0]), .aw(aw[0]), .mreq(mreq[0]));
  issue_slot #(.HAS_LSU(1'b0)) dut_alu (.s, .a, .b, .c, .acc_s, .acc_d, .mem_rdata,
    .w1(w1[1]), .w2(w2[1]), .aw(aw[1]), .mreq(mreq[1]));

  function automatic longint sx16(longint v);
    v = v & 64'hffff;
    return v > 32767 ? v - 65536 : v;
  endfunction
  function automatic longint sat16(longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, sb, sc, e1, e2, ea, t1, t2, lam;
    bit en1, en2, ena, men, mwe;
    int unsigned u;
    for (int i = 0; i < 20000; i++) begin
      s = slot_t'({$urandom, $urandom});
      s.op = opcode_e'(6'($urandom % 22));
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      if (s.op == OP_MODADD) begin c = 16'($urandom % 1000 + 1); a = 16'($urandom % c); b = 16'($urandom % (c + 1)); end
      if (s.op == OP_MODADDI) begin s.imm[21:6] = 16'($urandom % 1000 + 64); a = 16'($urandom % s.imm[21:6]); end
      acc_s = {8'($urandom), 32'($urandom)}; acc_d = {8'($urandom), 32'($urandom)};
      mem_rdata = 16'($urandom);
      #1;
      sa = sx16(a); sb = sx16(b); sc = sx16(c);
      en1 = 1; en2 = 0; ena = 0; men = 0; mwe = 0; e1 = 0; e2 = 0; ea = 0;
      case (s.op)
        OP_NOP:     en1 = 0;
        OP_ADD:     e1 = a + b;
        OP_SUB:     e1 = a - b;
        OP_ADDI:    e1 = a + s.imm[15:0];
        OP_LDI:     e1 = s.imm[15:0];
        OP_AND:     e1 = a & b;
        OP_OR:      e1 = a | b;
        OP_XOR:     e1 = a ^ b;
        OP_SLL:     e1 = longint'(a) << s.imm[3:0];
        OP_SRA:     e1 = sa >>> s.imm[3:0];
        OP_SLT:     e1 = (sa < sb) ? 1 : 0;
        OP_MODADD:  e1 = (longint'(a) + longint'(b)) % longint'(c);
        OP_MODADDI: e1 = (longint'(a) + longint'(s.imm[5:0])) % longint'(s.imm[21:6]);
        OP_LD:      begin men = 1; e1 = mem_rdata; end
        OP_ST:      begin en1 = 0; men = 1; mwe = 1; end
        OP_MULA:    begin en1 = 0; ena = 1; ea = sa * sb; end
        OP_MACA:    begin en1 = 0; ena = 1; ea = longint'(acc_d) + sa * sb; end
        OP_SFPMUL:  e1 = sat16((sa * sb) >>> s.imm[4:0]);
        OP_WARP: begin
          lam = sx16(s.imm[15:0]);
          e1 = sx16(sb + ((sa * lam) >>> 15));
          e2 = sx16(sa - ((e1 * lam) >>> 15));
          en2 = 1;
        end
        OP_PSNR: begin
          t1 = sx16((longint'(PSNR_K1) * sa) >>> 15);
          t2 = sx16((longint'(PSNR_K1) * sb) >>> 15);
          e1 = sat16((t1 * t2 + longint'(PSNR_K2) * (sc > 0 ? sc : 0)) >>> s.imm[4:0]);
        end
        OP_BSLICE: begin
          u  = acc_s[31:0];
          e1 = ((longint'(u) >> s.imm[4:0]) & ((64'd1 << s.imm[9:5]) - 1)) +
               ((longint'(u) & ((64'd1 << s.imm[19:15]) - 1)) << s.imm[14:10]);
        end
        OP_NORM: begin
          e1 = 0;
          for (int k = 14; k >= 0; k--) begin if (a[k] != a[15]) break; e1++; end
        end
        default: en1 = 0;
      endcase
      for (int d = 0; d < 2; d++) begin
        bit x1, xm;
        x1 = en1 && !(d == 1 && s.op == OP_LD);
        xm = men && d == 0;
        checks++;
        if (w1[d].en != x1 || (x1 && (w1[d].addr != s.d1 || w1[d].data != 16'(e1))) ||
            w2[d].en != en2 || (en2 && (w2[d].addr != s.d2 || w2[d].data != 16'(e2))) ||
            aw[d].en != ena || (ena && (aw[d].addr != s.d1[1:0] || aw[d].data != 40'(ea))) ||
            mreq[d].en != xm || (xm && (mreq[d].we != mwe || mreq[d].addr != 10'(a + s.imm[15:0]) ||
                                       (mwe && mreq[d].wdata != b)))) begin
          failures++;
          if (failures < 10) $display("FAIL op %s slot %0d w1 %0d/%h exp %0d/%h", s.op.name(), d,
                                      w1[d].en, w1[d].data, x1, 16'(e1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
