// loop_cache: small single-ported instruction store between program memory
// and the processor, filled and used under control of the loop instruction
// (compiler-driven loop cache).
//
// SIZE entries of W bits. In one cycle the single port either writes an
// entry (en & we: the bundle just fetched from program memory during the
// first pass of a loop) or reads one (en & !we, combinational: the bundle
// for a later pass, while program memory stays idle). Besides the array it
// keeps a tag, the program address of the first bundle of the cached loop
// body, and a valid flag that is set once a whole body has been captured.
// load_tag takes a new tag and clears valid; set_valid marks the body
// complete; flush clears valid. A loop whose first address equals the tag
// of a valid cache is served from the cache from its first pass on.
//
// A 32-entry, compiler-driven, single-ported loop cache is the design's;
// the fill protocol and the tag/valid re-entry rule are this implementation's.
module loop_cache #(
  parameter int unsigned W    = 160,
  parameter int unsigned SIZE = 32,
  parameter int unsigned TW   = 8,
  localparam int unsigned AW  = $clog2(SIZE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] idx,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic          load_tag,
  input  logic [TW-1:0] tag_in,
  input  logic          set_valid,
  input  logic          flush,
  output logic [TW-1:0] tag,
  output logic          valid
);
  logic [W-1:0] mem [SIZE];

  assign rdata = (en && !we) ? mem[idx] : '0;

  always_ff @(posedge clk) begin
    if (en && we) mem[idx] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag   <= '0;
      valid <= 1'b0;
    end else if (flush) begin
      valid <= 1'b0;
    end else if (load_tag) begin
      tag   <= tag_in;
      valid <= 1'b0;
    end else if (set_valid) begin
      valid <= 1'b1;
    end
  end
endmodule
