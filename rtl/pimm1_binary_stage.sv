// pimm1_binary_stage: one binary 3x3 neighbourhood processor of PIMM1.
//
// Works on a 1-bit image flow s. The 3x3 window is formed like the greytone
// one, with two bits of the external delay line for the two previous lines.
// A template made of a foreground mask fg (positions that must be 1) and a
// background mask bg (positions that must be 0) gives the hit-or-miss value
// hit; taps outside the image read as 0. Operations: pass, dilation and
// erosion by fg, hit-or-miss, thickening (centre | hit) and thinning
// (centre & ~hit), complement. With geo set the result is ANDed with the
// second (mask) flow m, which makes each step a geodesic one. The mask rides
// along on its own delay-line bit and leaves the stage aligned with the
// result (m_out), ready for the next stage. The document states the
// thickening support; the template encoding is this design's own.
//
// Timing: s_out(t) = f(window centred on s(t-P-2)); latency P+2.
module pimm1_binary_stage
  import msm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bstage_cfg_t cfg,
  input  logic        s,
  input  logic        m,
  input  logic [8:0]  vwin,      // valid of tap (i,j), bit 3*i+j
  output logic [2:0]  dl_to,     // [0] line 1, [1] line 2, [2] mask
  input  logic [2:0]  dl_from,
  output logic        s_out,
  output logic        m_out
);
  logic win [3][3];
  logic mc;
  logic [8:0] b;      // window in SE bit order, outside taps forced to 0
  logic hit, res;

  pimm1_window #(.W(1)) u_win (
    .clk(clk), .x(s),
    .dl_to0(dl_to[0]), .dl_to1(dl_to[1]),
    .dl_from0(dl_from[0]), .dl_from1(dl_from[1]),
    .win(win)
  );

  assign dl_to[2] = m;
  always_ff @(posedge clk) mc <= dl_from[2];

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        b[3*(2-i) + (2-j)] = win[i][j] & vwin[3*i+j];
    hit = ((b & cfg.fg) == cfg.fg) && ((b & cfg.bg) == 9'd0);
    unique case (cfg.op)
      B_PASS:  res = b[4];
      B_DIL:   res = |(b & cfg.fg);
      B_ERO:   res = ((b | ~vwin_se(vwin)) & cfg.fg) == cfg.fg;
      B_HMT:   res = hit;
      B_THICK: res = b[4] | hit;
      B_THIN:  res = b[4] & ~hit;
      B_NOT:   res = ~b[4];
      default: res = b[4];
    endcase
    if (cfg.geo) res = res & mc;
  end

  // valid taps re-ordered to SE bit order; erosion ignores outside taps
  function automatic logic [8:0] vwin_se(logic [8:0] vw);
    logic [8:0] r;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        r[3*(2-i) + (2-j)] = vw[3*i+j];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_out <= 1'b0; m_out <= 1'b0;
    end else begin
      s_out <= vwin[4] & res;
      m_out <= vwin[4] & mc;
    end
  end
endmodule
