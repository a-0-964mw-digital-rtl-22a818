// modadd_unit: modulo add for circular-buffer indexing (the OP_modadd
// operation).
//
// out = (a + b) mod m, computed as one add followed by one conditional
// subtract of m, which is exact for 0 <= a < m and 0 <= b <= m, the case of
// an index stepping through a buffer of length m. With m = 0 the plain sum
// is returned. Operands are unsigned. Combinational, single cycle.
//
// The design names a modulo-add operation for circular buffers; the
// single conditional subtract and the m = 0 case are this implementation's.
module modadd_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] m,
  output logic [W-1:0] out
);
  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    if (m != '0 && sum >= {1'b0, m}) out = W'(sum - {1'b0, m});
    else                             out = sum[W-1:0];
  end
endmodule
