// histogrammer: optional grey-level histogram unit of a processor board.
//
// Counts, for each grey level, the image pixels (v high) that pass on the
// tapped flow, so that the host can read the histogram of an intermediate
// result without transferring the image. A write (clr) clears all cnt.
// Counters saturate at 2**CW-1. The document only places the unit on the
// board (after the third PIMM1); the bin count and clearing are this
// design's own.
//
// Timing: a pixel is counted at the clock edge where it is presented; rdata
// is combinational from raddr.
module histogrammer #(
  parameter int CW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    d,
  input  logic          v,
  input  logic          clr,
  input  logic [7:0]    raddr,
  output logic [CW-1:0] rdata
);
  logic [CW-1:0] cnt [256];

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int i = 0; i < 256; i++) cnt[i] <= '0;
    end else if (v && cnt[d] != '1) begin
      cnt[d] <= cnt[d] + 1'b1;
    end
  end

  assign rdata = cnt[raddr];
endmodule
