// issue_slot: one issue slot of the VLIW processor, executing one 48-bit
// slot word per cycle.
//
// Each slot holds a 16-bit ALU (add, subtract, logic, shifts, compare,
// load immediate), the modulo adder, a 16x16 multiplier feeding the 40-bit
// accumulators, and the five custom function units: warp_unit (all-pass
// section), sfpmul_unit (fixed-point multiply with shift), psnr_unit
// (a-priori SNR), bitslice_unit (bit range of an accumulator) and norm_unit
// (redundant sign bits). A slot with HAS_LSU = 1 also owns a load/store
// unit; slot 0 is wired to the main data memory and slot 1 to the local
// data memory, so two loads or stores can go out in one bundle.
//
// Combinational: operands a, b, c (register s1, s2, s3), acc_s (accumulator
// s1) and acc_d (accumulator d1) come in, write requests for up to two
// registers, one accumulator and one memory access go out in the same
// cycle; a load's data (mem_rdata) returns combinationally. Every slot
// carries every unit; how the design assigned the custom units to slots is
// not known, so none is left out.
//
// The custom units and the 3-input/2-output operand limit are the design's;
// the basic operation set and the unit-to-slot allocation are this
// implementation's.
module issue_slot
  import hasip_pkg::*;
#(
  parameter bit HAS_LSU = 1'b1
) (
  input  slot_t   s,
  input  word_t   a,
  input  word_t   b,
  input  word_t   c,
  input  acc_t    acc_s,
  input  acc_t    acc_d,
  input  word_t   mem_rdata,
  output rf_wr_t  w1,
  output rf_wr_t  w2,
  output acc_wr_t aw,
  output dm_req_t mreq
);
  word_t               warp_state, warp_y, sfp_out, psnr_out, bs_out, ma_out;
  logic [3:0]          norm_out;
  logic signed [31:0]  prod;
  logic [DATA_W-1:0]   ma_b, ma_m;
  logic [31:0]         rmask, lmask;

  warp_unit #(.W(DATA_W)) u_warp (
    .state(a), .x(b), .lambda(s.imm[15:0]), .out_state(warp_state), .out_y(warp_y)
  );

  sfpmul_unit #(.W(DATA_W)) u_sfp (
    .a(a), .b(b), .shamt(s.imm[4:0]), .out(sfp_out)
  );

  psnr_unit u_psnr (
    .a(a), .b(b), .c(c), .k1(PSNR_K1), .k2(PSNR_K2), .floor_v(PSNR_FLOOR),
    .shamt(s.imm[4:0]), .out(psnr_out)
  );

  assign rmask = (32'd1 << s.imm[9:5]) - 32'd1;
  assign lmask = (32'd1 << s.imm[19:15]) - 32'd1;

  bitslice_unit #(.IW(32), .OW(DATA_W)) u_bs (
    .x(acc_s[31:0]), .rshift(s.imm[4:0]), .rmask(rmask),
    .lshift(s.imm[14:10]), .lmask(lmask), .out(bs_out)
  );

  norm_unit #(.W(DATA_W)) u_norm (.x(a), .out(norm_out));

  assign ma_b = (s.op == OP_MODADDI) ? DATA_W'(s.imm[5:0]) : b;
  assign ma_m = (s.op == OP_MODADDI) ? s.imm[21:6]        : c;

  modadd_unit #(.W(DATA_W)) u_modadd (.a(a), .b(ma_b), .m(ma_m), .out(ma_out));

  assign prod = $signed(a) * $signed(b);

  always_comb begin
    w1   = '{en: 1'b0, addr: s.d1, data: '0};
    w2   = '{en: 1'b0, addr: s.d2, data: '0};
    aw   = '{en: 1'b0, addr: s.d1[1:0], data: '0};
    mreq = '{en: 1'b0, we: 1'b0, addr: DM_AW'(a + s.imm[15:0]), wdata: b};
    unique case (s.op)
      OP_ADD:     begin w1.en = 1'b1; w1.data = a + b; end
      OP_SUB:     begin w1.en = 1'b1; w1.data = a - b; end
      OP_ADDI:    begin w1.en = 1'b1; w1.data = a + s.imm[15:0]; end
      OP_LDI:     begin w1.en = 1'b1; w1.data = s.imm[15:0]; end
      OP_AND:     begin w1.en = 1'b1; w1.data = a & b; end
      OP_OR:      begin w1.en = 1'b1; w1.data = a | b; end
      OP_XOR:     begin w1.en = 1'b1; w1.data = a ^ b; end
      OP_SLL:     begin w1.en = 1'b1; w1.data = a << s.imm[3:0]; end
      OP_SRA:     begin w1.en = 1'b1; w1.data = $signed(a) >>> s.imm[3:0]; end
      OP_SLT:     begin w1.en = 1'b1; w1.data = {15'd0, $signed(a) < $signed(b)}; end
      OP_MODADD,
      OP_MODADDI: begin w1.en = 1'b1; w1.data = ma_out; end
      OP_LD: if (HAS_LSU) begin
        mreq.en = 1'b1;
        w1.en   = 1'b1;
        w1.data = mem_rdata;
      end
      OP_ST: if (HAS_LSU) begin
        mreq.en = 1'b1;
        mreq.we = 1'b1;
      end
      OP_MULA:    begin aw.en = 1'b1; aw.data = ACC_W'(prod); end
      OP_MACA:    begin aw.en = 1'b1; aw.data = acc_d + ACC_W'(prod); end
      OP_SFPMUL:  begin w1.en = 1'b1; w1.data = sfp_out; end
      OP_WARP: begin
        w1.en = 1'b1; w1.data = warp_state;
        w2.en = 1'b1; w2.data = warp_y;
      end
      OP_PSNR:    begin w1.en = 1'b1; w1.data = psnr_out; end
      OP_BSLICE:  begin w1.en = 1'b1; w1.data = bs_out; end
      OP_NORM:    begin w1.en = 1'b1; w1.data = DATA_W'(norm_out); end
      default: ;
    endcase
  end
endmodule
