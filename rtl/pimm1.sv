// pimm1: behavioural-level RTL of the PIMM1 mathematical-morphology chip.
//
// The image flow enters on DIA (image A), DIB (image B, the second flow)
// and DIC (auxiliary image), qualified by the video signals HENI/VENI, at
// one pixel per clock (20 MHz in the original system). It goes through
//   point processing -> neighbourhood unit + processing unit -> DIO
// The processing unit works in one of three modes set by the programming
// unit: two parallel greytone 3x3 processors, eight binary 3x3 processors
// (in pipeline or in parallel), or the recursive distance/reconstruction operator. The line
// memories are outside the chip: 24 bits go out on DL_TO and come back one
// line later on DL_FROM (see line_delay). The synchronization unit delays
// the video signals to HENO/VENO so that they frame DIO. GPO carries the
// second flow realigned with DIO (or the second greytone processor's result)
// so that chips can be chained with geodesic operations.
//
// Programming: with PROC/PROGN low, a write is CSN=0, R/WN=0, ADD, DATAI in
// one clock; with CSN=0, R/WN=1 the register ADD appears on DATAO.
//
// Latency DIA->DIO: P+3 clocks (greytone, recursive, binary stages in
// parallel), 1+NB*(P+2) (binary stages in pipeline).
// The pins, units and the 24-bit delay line follow the document's block
// diagrams; the measurement unit is not built (its function is not given)
// and all internal encodings are this design's own.
module pimm1
  import msm_pkg::*;
#(
  parameter int P = 264        // clocks per video line = delay-line depth
) (
  input  logic        clk,
  input  logic        rst_n,
  // image flow
  input  logic [7:0]  dia,
  input  logic [7:0]  dib,
  input  logic [7:0]  dic,
  input  logic        heni,
  input  logic        veni,
  output logic [7:0]  dio,
  output logic [7:0]  gpo,
  output logic        heno,
  output logic        veno,
  // external delay lines
  output logic [23:0] dl_to,
  input  logic [23:0] dl_from,
  // programming
  input  logic        proc_progn,
  input  logic        csn,
  input  logic        rwn,
  input  logic [5:0]  add,
  input  logic [7:0]  datai,
  output logic [7:0]  datao
);
  localparam int NB = NBSTAGE;
  localparam int SL = P + 2;
  localparam int N  = NB*SL + 2*P + 3;

  pimm_cfg_t cfg;
  logic [7:0] p, q;
  logic       pv;
  logic [N-1:0] vh;
  logic [8:0] vwin;
  logic [23:0] g_to, b_to, r_to;
  logic [7:0]  g_dio, g_gpo, b_dio, b_gpo, r_dio, r_gpo;

  pimm1_prog_unit u_prog (
    .clk(clk), .rst_n(rst_n), .proc_progn(proc_progn), .csn(csn), .rwn(rwn),
    .add(add), .datai(datai), .datao(datao), .cfg(cfg)
  );

  pimm1_point_unit u_point (
    .clk(clk), .rst_n(rst_n), .op(cfg.pt_op), .thr_lo(cfg.thr_lo), .thr_hi(cfg.thr_hi),
    .a(dia), .b(dib), .c(dic), .vin(heni & veni), .p(p), .q(q), .v(pv)
  );

  pimm1_sync_unit #(.P(P), .NB(NB), .N(N)) u_sync (
    .clk(clk), .rst_n(rst_n), .mode(cfg.mode), .par(cfg.b_par), .flush(!proc_progn), .heni(heni), .veni(veni),
    .vh(vh), .heno(heno), .veno(veno)
  );

  for (genvar i = 0; i < 3; i++) begin : g_vi
    for (genvar j = 0; j < 3; j++) begin : g_vj
      assign vwin[3*i+j] = vh[i*P + j];
    end
  end

  pimm1_greytone_unit u_grey (
    .clk(clk), .rst_n(rst_n), .g0_op(cfg.g0_op), .g0_se(cfg.g0_se),
    .g1_op(cfg.g1_op), .g1_se(cfg.g1_se), .comb(cfg.g_comb), .gpo_p1(cfg.gpo_p1),
    .p(p), .q(q), .vwin(vwin), .dl_to(g_to), .dl_from(dl_from),
    .dio(g_dio), .gpo(g_gpo)
  );

  pimm1_binary_unit #(.P(P), .NB(NB), .N(N)) u_bin (
    .clk(clk), .rst_n(rst_n), .cfg(cfg.bst), .par(cfg.b_par), .p(p), .q(q), .vh(vh),
    .dl_to(b_to), .dl_from(dl_from), .dio(b_dio), .gpo(b_gpo)
  );

  pimm1_recursive_unit u_rec (
    .clk(clk), .rst_n(rst_n), .op(cfg.r_op), .p(p), .q(q),
    .v_cur(pv), .v_left(vh[1]), .v_up(vh[P]),
    .dl_to(r_to), .dl_from(dl_from), .dio(r_dio), .gpo(r_gpo)
  );

  always_comb begin
    unique case (cfg.mode)
      MODE_BIN: begin dl_to = b_to; dio = b_dio; gpo = b_gpo; end
      MODE_REC: begin dl_to = r_to; dio = r_dio; gpo = r_gpo; end
      default:  begin dl_to = g_to; dio = g_dio; gpo = g_gpo; end
    endcase
  end
endmodule
