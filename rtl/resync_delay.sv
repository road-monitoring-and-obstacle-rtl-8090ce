// resync_delay: programmable delay line that re-synchronises the second
// (geodesic) image flow with the main flow on a processor board.
//
// A PIMM1 delays the main flow by a latency that depends on its mode; the
// second flow that bypasses the chip must be delayed by the same amount to
// meet the processed pixels at the next chip. The delay, in clocks, is set by
// the host (depth, 1..MAXD). The document says that delay lines were added to
// re-synchronise the geodesic flow; making the depth programmable is this
// design's choice, so that one board works in every chip mode.
//
// Timing: dout(t) = din(t - depth).
module resync_delay #(
  parameter int W    = 8,
  parameter int MAXD = 2130
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     depth,
  input  logic [W-1:0]    din,
  output logic [W-1:0]    dout
);
  localparam int AW = $clog2(MAXD + 1);

  logic [W-1:0]  mem [MAXD];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   diff;

  always_comb begin
    diff = {1'b0, wptr} - (AW+1)'(depth);
    if (diff[AW]) diff = diff + (AW+1)'(MAXD);
    rptr = diff[AW-1:0];
  end

  assign dout = mem[rptr];

  always_ff @(posedge clk) begin
    if (!rst_n) wptr <= '0;
    else        wptr <= (wptr == AW'(MAXD - 1)) ? '0 : wptr + 1'b1;
  end

  always_ff @(posedge clk) mem[wptr] <= din;
endmodule
