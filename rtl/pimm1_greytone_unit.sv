// pimm1_greytone_unit: the two greytone 3x3 neighbourhood processors of PIMM1.
//
// Both processors see the same 3x3 window of the point-unit output p (the
// two greytone processors "work in parallel on the same data flow"). Each
// computes a dilation (maximum) or an erosion (minimum) over its own 3x3
// structuring element; taps outside the image are ignored. The two results
// P0 and P1 are then combined: P0, P1, P0-P1 (morphological gradient), the
// elementary geodesic dilation/erosion step min/max(P0, Q) with the second
// flow Q, and the residues centre-P0 / P0-centre. The choice of combinations
// is this design's own; the document gives the function only.
//
// Delay-line use (24 bits): [7:0] and [15:8] the two previous lines of p,
// [23:16] the second flow q delayed by one line so that it lines up with the
// window centre.
//
// Timing: dio/gpo are registered; a pixel of p at time t leaves at t+P+2.
// Outputs are 0 where the centre is not an image pixel.
module pimm1_greytone_unit
  import msm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  g_op_e       g0_op,
  input  logic [8:0]  g0_se,
  input  g_op_e       g1_op,
  input  logic [8:0]  g1_se,
  input  g_comb_e     comb,
  input  logic        gpo_p1,
  input  logic [7:0]  p,
  input  logic [7:0]  q,
  input  logic [8:0]  vwin,     // valid of tap (i,j), bit 3*i+j (i=0 below, j=0 right)
  output logic [23:0] dl_to,
  input  logic [23:0] dl_from,
  output logic [7:0]  dio,
  output logic [7:0]  gpo
);
  logic [7:0] win [3][3];
  logic [7:0] qc;

  pimm1_window #(.W(8)) u_win (
    .clk(clk), .x(p),
    .dl_to0(dl_to[7:0]), .dl_to1(dl_to[15:8]),
    .dl_from0(dl_from[7:0]), .dl_from1(dl_from[15:8]),
    .win(win)
  );

  assign dl_to[23:16] = q;
  always_ff @(posedge clk) qc <= dl_from[23:16];

  // SE bit of window tap (i,j): row 2-i from the top, column 2-j from the left
  function automatic logic [7:0] nbr_op(g_op_e op, logic [8:0] se, logic [8:0] vw,
                                        logic [7:0] w [3][3]);
    logic [7:0] acc;
    acc = (op == G_DIL) ? 8'h00 : 8'hFF;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        if (se[3*(2-i) + (2-j)] && vw[3*i+j]) begin
          if (op == G_DIL) acc = (w[i][j] > acc) ? w[i][j] : acc;
          else             acc = (w[i][j] < acc) ? w[i][j] : acc;
        end
    return acc;
  endfunction

  logic [7:0] p0, p1, ctr, res;

  always_comb begin
    p0  = nbr_op(g0_op, g0_se, vwin, win);
    p1  = nbr_op(g1_op, g1_se, vwin, win);
    ctr = win[1][1];
    unique case (comb)
      GC_P0:        res = p0;
      GC_P1:        res = p1;
      GC_P0_SUB_P1: res = sat_sub(p0, p1);
      GC_MIN_Q:     res = (p0 < qc) ? p0 : qc;
      GC_MAX_Q:     res = (p0 > qc) ? p0 : qc;
      GC_C_SUB_P0:  res = sat_sub(ctr, p0);
      GC_P0_SUB_C:  res = sat_sub(p0, ctr);
      default:      res = p0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dio <= '0; gpo <= '0;
    end else begin
      dio <= vwin[4] ? res : 8'h00;
      gpo <= vwin[4] ? (gpo_p1 ? p1 : qc) : 8'h00;
    end
  end
endmodule
