// morpho_lut: look-up table on the image flow of a processor board.
//
// The input LUT of a board implements the grey-level anamorphosis that makes
// the watershed fast: loaded with floor(log2(f+1)) it maps 256 grey levels
// to nine (0..8), so the level-by-level flooding needs far fewer scans. The
// output LUT maps the 8-bit result back onto the 9-bit bus. The table is RAM
// written by the host; at reset it holds the identity (in & (2**DW-1)).
// The LUT positions and the 9-bit bus width come from the board diagram; the
// reset content and the host port are this design's choices.
//
// Timing: dout is registered, one clock after din; the video signals and any
// flow that travels beside the LUT must be delayed by one clock as well.
module morpho_lut #(
  parameter int AW = 9,
  parameter int DW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] din,
  output logic [DW-1:0] dout,
  // host port
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2**AW; i++) mem[i] <= DW'(i);
    end else if (we) begin
      mem[addr] <= wdata;
    end
  end

  always_ff @(posedge clk) dout <= mem[din];

  assign rdata = mem[addr];
endmodule
