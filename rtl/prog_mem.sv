// prog_mem: DEPTH x W program memory (W = 160, the instruction width).
//
// One write port for the host that loads the program while the processor
// is stopped, and one read port for instruction fetch. A read is
// combinational and only happens while re is high (rdata is zero
// otherwise); re is what the loop cache holds low to save program memory
// accesses. Writes land at the clock edge.
//
// The 160-bit width is the design's; depth, the host write port and the
// combinational read are this implementation's.
module prog_mem #(
  parameter int unsigned W     = 160,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  assign rdata = re ? mem[raddr] : '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
endmodule
