// warp_unit: one first-order all-pass section of a frequency-warped FIR
// filter, as a single-cycle custom function unit (custom instruction
// OP_warp_unit).
//
// The section A(z) = (z^-1 - lambda) / (1 - lambda z^-1) is computed in
// direct form II with one state word w:
//   w(n) = x(n)   + lambda * w(n-1)      -> out_state (out_op1)
//   y(n) = w(n-1) - lambda * w(n)        -> out_y     (out_op2)
// which is the dataflow of two constant multiplications, one add and one
// subtract of the custom instruction. Chaining sections, with y of one as x
// of the next, gives the tapped delay line of the warped filter.
//
// Interface: state = w(n-1), x = section input, lambda = warping factor in
// Q1.15. Products are Q1.15, truncated by an arithmetic shift of 15; sums
// wrap in 16 bits like the plain add and subtract of the dataflow graph
// (software scales the input so that the state does not overflow).
// Purely combinational: results are valid in the cycle the operands are.
//
// The all-pass dataflow is the design's; the number format, truncation
// and wrap-around are this implementation's choices.
module warp_unit #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] state,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] lambda,
  output logic signed [W-1:0] out_state,
  output logic signed [W-1:0] out_y
);
  logic signed [2*W-1:0] p1, p2;

  always_comb begin
    p1        = state * lambda;
    out_state = x + W'(p1 >>> (W-1));
    p2        = out_state * lambda;
    out_y     = state - W'(p2 >>> (W-1));
  end
endmodule
