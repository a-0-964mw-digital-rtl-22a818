// bitslice_unit: extracts a bit range from a 32-bit word (custom
// instruction OP_bitslice), typically to take a 16-bit result out of a
// wide intermediate such as a product or an accumulator.
//
// out = ( ((x >> rshift) & rmask) + ((x & lmask) << lshift) )[OW-1:0]
// Two paths, shift-right-then-mask and mask-then-shift-left, are added, so
// one instruction can move one field down and another field up (for
// example to join a bit range that is split in two). All four controls are
// instruction constants. Shifts are logical. Combinational, single cycle.
//
// The two shift/mask paths and the add are the design's; the 16-bit
// output width and logical shifts are this implementation's choices.
module bitslice_unit #(
  parameter int unsigned IW = 32,
  parameter int unsigned OW = 16
) (
  input  logic [IW-1:0]          x,
  input  logic [$clog2(IW)-1:0]  rshift,
  input  logic [IW-1:0]          rmask,
  input  logic [$clog2(IW)-1:0]  lshift,
  input  logic [IW-1:0]          lmask,
  output logic [OW-1:0]          out
);
  logic [IW-1:0] right, left;

  always_comb begin
    right = (x >> rshift) & rmask;
    left  = (x & lmask) << lshift;
    out   = right[OW-1:0] + left[OW-1:0];
  end
endmodule
