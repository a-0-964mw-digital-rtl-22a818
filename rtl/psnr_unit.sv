// psnr_unit: a-priori SNR of the noise reduction (custom instruction
// OP_psnr), a decision-directed estimate built from three operands.
//
//   t1  = (k1 * a) >>> 15            t2 = (k1 * b) >>> 15
//   c'  = max(c, floor)
//   out = saturate_16( (t1 * t2 + k2 * c') >>> shamt )
// With k1 = sqrt(alpha), k2 = 1 - alpha (Q1.15), a = previous gain,
// b = previous gain times previous a-posteriori SNR and c = current
// a-posteriori SNR minus one, this is
//   xi = alpha * G^2 * gamma_prev + (1 - alpha) * max(gamma - 1, 0).
// The structure (two constant multiplies feeding a multiply, a selected and
// weighted third operand, add, shift right, output select) is that of the
// instruction's dataflow graph; the meaning of each operand, the max() and
// the output saturation are this design's reading of it.
// Combinational, single cycle.
module psnr_unit (
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  input  logic signed [15:0] c,
  input  logic signed [15:0] k1,
  input  logic signed [15:0] k2,
  input  logic signed [15:0] floor_v,
  input  logic [4:0]         shamt,
  output logic signed [15:0] out
);
  logic signed [31:0] m1, m2, p, q;
  logic signed [15:0] t1, t2, csel;
  logic signed [32:0] s, sh;

  always_comb begin
    m1   = k1 * a;
    m2   = k1 * b;
    t1   = 16'(m1 >>> 15);
    t2   = 16'(m2 >>> 15);
    p    = t1 * t2;
    csel = (c > floor_v) ? c : floor_v;
    q    = k2 * csel;
    s    = 33'(p) + 33'(q);
    sh   = s >>> shamt;
    if (sh > 33'sd32767)       out = 16'sh7fff;
    else if (sh < -33'sd32768) out = 16'sh8000;
    else                       out = sh[15:0];
  end
endmodule
