// data_mem: single-ported DEPTH x W data memory. The processor has two, the
// main data memory and the additional local data memory, each served by its
// own load/store unit so that two loads can issue in the same bundle.
//
// Timing: a read is combinational (rdata = mem[addr] while en is high and
// we low, zero otherwise), so a load completes in the cycle it issues; a
// write (en and we) lands at the clock edge. The contents are not reset;
// the host fills the memory before the program runs.
//
// Two data memories with their own load/store units are the design's;
// depth and combinational read are this implementation's.
module data_mem #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  assign rdata = (en && !we) ? mem[addr] : '0;

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
  end
endmodule
