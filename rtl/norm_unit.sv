// norm_unit: counts the redundant sign bits of a W-bit signed word (custom
// instruction OP_norm), the normalisation step of a fixed-point division.
//
// The unit unrolls the loop of its dataflow graph: the value is shifted
// right by one and a counter incremented as long as the value still has
// bits other than sign copies (it is neither 0 nor -1); the result is the
// constant W-1 minus that count. So out = number of bits below the sign bit
// that equal the sign bit: 0 for 0x4000 or 0x8000, 14 for 1, and W-1 for 0
// and -1. Combinational, single cycle.
//
// The shift/count/subtract loop is the design's; unrolling it into one
// cycle and the results for 0 and -1 are this implementation's choices.
module norm_unit #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]      x,
  output logic [$clog2(W)-1:0]     out
);
  logic signed [W-1:0]   v;
  logic [$clog2(W+1)-1:0] cnt;

  always_comb begin
    v   = x;
    cnt = '0;
    for (int i = 0; i < W - 1; i++) begin
      if (v != '0 && v != '1) begin
        v   = v >>> 1;
        cnt = cnt + 1'b1;
      end
    end
    out = $clog2(W)'(W - 1 - cnt);
  end
endmodule
