// pimm1_window: 3x3 neighbourhood former of the PIMM1 neighbourhood unit.
//
// The chip holds only the pixels of the current line; the two previous lines
// come back from the external delay line. For the newest sample x(t) the
// unit sends x(t) out on dl_to0 and receives x(t-P) on dl_from0, then sends
// x(t-P) out on dl_to1 and receives x(t-2P) on dl_from1 (P = line period).
// Two registers per row give the horizontal taps. The window centre is
// therefore x(t-P-1), one line and one pixel behind the input.
//
// win[i][j]: i = 0 line below the centre ... 2 line above,
//            j = 0 pixel right of the centre ... 2 pixel left.
// Validity of the taps (image borders) is supplied separately by the
// synchronization unit. Following the delay-line scheme of the board
// diagram; the tap numbering is this design's own.
module pimm1_window #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] x,         // newest sample
  output logic [W-1:0] dl_to0,    // to external delay line, first line
  output logic [W-1:0] dl_to1,    // to external delay line, second line
  input  logic [W-1:0] dl_from0,  // x(t-P)
  input  logic [W-1:0] dl_from1,  // x(t-2P)
  output logic [W-1:0] win [3][3]
);
  logic [W-1:0] r0a, r0b, r1a, r1b, r2a, r2b;

  assign dl_to0 = x;
  assign dl_to1 = dl_from0;

  always_ff @(posedge clk) begin
    r0a <= x;        r0b <= r0a;
    r1a <= dl_from0; r1b <= r1a;
    r2a <= dl_from1; r2b <= r2a;
  end

  always_comb begin
    win[0][0] = x;        win[0][1] = r0a; win[0][2] = r0b;
    win[1][0] = dl_from0; win[1][1] = r1a; win[1][2] = r1b;
    win[2][0] = dl_from1; win[2][1] = r2a; win[2][2] = r2b;
  end
endmodule
