// acc_file: NACC x 40-bit registers for intermediate results (products and
// multiply-accumulate sums), with NR asynchronous read ports and NW write
// ports. Same timing as register_file: reads see the value before this
// cycle's writes, the highest numbered write port wins on a conflict, and
// everything resets to zero.
//
// 40-bit intermediate registers are the design's; their number and ports
// are this implementation's.
module acc_file #(
  parameter int unsigned W    = 40,
  parameter int unsigned NACC = 4,
  parameter int unsigned NR   = 6,
  parameter int unsigned NW   = 3,
  localparam int unsigned AW  = $clog2(NACC)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][W-1:0]  rdata,
  input  logic [NW-1:0]         we,
  input  logic [NW-1:0][AW-1:0] waddr,
  input  logic [NW-1:0][W-1:0]  wdata
);
  logic [NACC-1:0][W-1:0] acc;

  always_comb begin
    for (int r = 0; r < NR; r++) rdata[r] = acc[raddr[r]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p]) acc[waddr[p]] <= wdata[p];
    end
  end
endmodule
