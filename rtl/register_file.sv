// register_file: DEPTH x W general-purpose register file with NR
// combinational read ports and NW write ports.
//
// The processor has two of these (16 registers each), one for register
// numbers 0-15 and one for 16-31. Reads are asynchronous and see the value
// before the current cycle's writes. Writes land at the clock edge; when
// several write ports address the same register in one cycle, the highest
// numbered port wins (the program is expected never to do this). All
// registers reset to zero.
//
// Two files of 16 x 16 bits are the design's; port counts, reset and the
// conflict rule are this implementation's.
module register_file #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NR    = 10,
  parameter int unsigned NW    = 6,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][W-1:0]  rdata,
  input  logic [NW-1:0]         we,
  input  logic [NW-1:0][AW-1:0] waddr,
  input  logic [NW-1:0][W-1:0]  wdata
);
  logic [DEPTH-1:0][W-1:0] regs;

  always_comb begin
    for (int r = 0; r < NR; r++) rdata[r] = regs[raddr[r]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule
