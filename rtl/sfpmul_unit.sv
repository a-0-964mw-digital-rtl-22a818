// sfpmul_unit: signed fixed-point multiplication with shift (custom
// instruction OP_sfpmul).
//
// out = saturate_W( (a * b) >>> shamt )
// The full 2W-bit signed product is shifted right arithmetically by a
// constant shift amount and saturated to W bits: when the shifted product
// does not fit, the output is the largest positive or most negative word,
// whichever the sign of the product calls for. With shamt = W-1 this is a Q1.15 multiply that turns
// (-1) * (-1) into the largest positive value instead of wrapping.
// Combinational, single cycle.
//
// Multiply-then-shift is the design's; reading its multiplexers as
// saturation, and the floor rounding, are this implementation's choices.
module sfpmul_unit #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]     a,
  input  logic signed [W-1:0]     b,
  input  logic [$clog2(2*W)-1:0]  shamt,
  output logic signed [W-1:0]     out
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  localparam logic signed [2*W-1:0] MAXW = {{(W+1){1'b0}}, {(W-1){1'b1}}};
  localparam logic signed [2*W-1:0] MINW = {{(W+1){1'b1}}, {(W-1){1'b0}}};

  logic signed [2*W-1:0] prod, sh;

  always_comb begin
    prod = a * b;
    sh   = prod >>> shamt;
    if (sh > MAXW)      out = MAXV;
    else if (sh < MINW) out = MINV;
    else                      out = sh[W-1:0];
  end
endmodule
