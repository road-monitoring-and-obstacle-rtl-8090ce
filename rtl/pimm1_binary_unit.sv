// pimm1_binary_unit: the eight binary neighbourhood processors of PIMM1.
//
// NB binary stages are chained: stage k+1 processes the output of stage k,
// so eight 3x3 steps (for instance a thickening by the eight rotations of a
// template) are done in one scan. The binary image is bit 0 of the
// point-unit output, the mask bit 0 of the second flow. Stage k uses bits
// 2k and 2k+1 of the external delay line for its two lines and bit 16+k for
// its mask. With par set the stages are organised in parallel instead: all
// of them see the same window of p, and the result is the OR of the stages
// not programmed as pass (or stage 0 alone if all are pass), for instance
// the union of eight hit-or-miss transforms. Both organisations are named
// in the document; the OR combination is this design's choice.
//
// Timing: latency NB*(P+2) clocks from p to dio in pipeline, P+2 in
// parallel. dio is 0x00/0xFF.
module pimm1_binary_unit
  import msm_pkg::*;
#(
  parameter int P  = 264,
  parameter int NB = 8,
  parameter int N  = NB*(P+2) + 2*P + 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bstage_cfg_t [NB-1:0] cfg,
  input  logic        par,      // stages in parallel instead of in pipeline
  input  logic [7:0]  p,
  input  logic [7:0]  q,
  input  logic [N-1:0] vh,       // valid history from the synchronization unit
  output logic [23:0] dl_to,
  input  logic [23:0] dl_from,
  output logic [7:0]  dio,
  output logic [7:0]  gpo
);
  localparam int SL = P + 2;

  logic [NB:0] s, m;
  assign s[0] = p[0];
  assign m[0] = q[0];

  logic [NB-1:0] act;      // stages that contribute to the parallel result

  for (genvar k = 0; k < NB; k++) begin : g_stage
    logic [8:0] vw;
    logic [2:0] to, from;
    for (genvar i = 0; i < 3; i++) begin : g_vi
      for (genvar j = 0; j < 3; j++) begin : g_vj
        assign vw[3*i+j] = par ? vh[i*P + j] : vh[k*SL + i*P + j];
      end
    end
    assign act[k] = cfg[k].op != B_PASS;
    assign dl_to[2*k +: 2] = to[1:0];
    assign dl_to[16 + k]   = to[2];
    assign from = {dl_from[16 + k], dl_from[2*k +: 2]};
    pimm1_binary_stage u_stage (
      .clk(clk), .rst_n(rst_n), .cfg(cfg[k]),
      .s(par ? s[0] : s[k]), .m(par ? m[0] : m[k]), .vwin(vw),
      .dl_to(to), .dl_from(from),
      .s_out(s[k+1]), .m_out(m[k+1])
    );
  end
  if (NB < 8) begin : g_unused
    assign dl_to[15:2*NB]  = '0;
    assign dl_to[23:16+NB] = '0;
  end

  logic s_par;
  always_comb begin
    s_par = 1'b0;
    for (int k = 0; k < NB; k++) if (act[k]) s_par = s_par | s[k+1];
    if (act == '0) s_par = s[1];
  end

  assign dio = {8{par ? s_par : s[NB]}};
  assign gpo = {8{par ? m[1] : m[NB]}};
endmodule
