// pipeline_processor: one pipeline processor of the sub-module, made of
// NBOARDS morphological boards in series on the morphobus.
//
// The main pipeline processor chains two boards (eight PIMM1 in pipeline),
// the output morphobus of board 1 (DIOBUS, DIBOBUS, video signals) driving
// the input of board 2. The second pipeline processor is a single board.
// HIST_MASK bit b puts a histogrammer on board b (the main processor has it
// on its first board, the second processor on its only board).
//
// Host access: cfg_addr[17:16] selects the board, [15:0] is the board
// address. Latency: sum of the board latencies.
module pipeline_processor
  import msm_pkg::*;
#(
  parameter int P         = 264,
  parameter int NBOARDS   = 2,
  parameter int HIST_MASK = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [8:0]  main_in,
  input  logic [7:0]  second_in,
  input  logic        hen,
  input  logic        ven,
  output logic [8:0]  result,
  output logic [7:0]  second_out,
  output logic        heno,
  output logic        veno,
  input  logic        cfg_we,
  input  logic [17:0] cfg_addr,
  input  logic [15:0] cfg_wdata,
  output logic [15:0] cfg_rdata
);
  logic [8:0]  a [NBOARDS+1];
  logic [7:0]  b [NBOARDS+1];
  logic        h [NBOARDS+1];
  logic        v [NBOARDS+1];
  logic [15:0] rd [NBOARDS];

  assign a[0] = main_in;
  assign b[0] = second_in;
  assign h[0] = hen;
  assign v[0] = ven;

  for (genvar n = 0; n < NBOARDS; n++) begin : g_board
    morpho_board #(.P(P), .NCHIP(4), .HIST(HIST_MASK[n])) u_board (
      .clk(clk), .rst_n(rst_n),
      .diabus(a[n]), .dibbus(b[n]), .hen(h[n]), .ven(v[n]),
      .diobus(a[n+1]), .dibobus(b[n+1]), .heno(h[n+1]), .veno(v[n+1]),
      .cfg_we(cfg_we && cfg_addr[17:16] == 2'(n)), .cfg_addr(cfg_addr[15:0]),
      .cfg_wdata(cfg_wdata), .cfg_rdata(rd[n])
    );
  end

  assign result     = a[NBOARDS];
  assign second_out = b[NBOARDS];
  assign heno       = h[NBOARDS];
  assign veno       = v[NBOARDS];

  always_comb begin
    cfg_rdata = '0;
    for (int n = 0; n < NBOARDS; n++)
      if (cfg_addr[17:16] == 2'(n)) cfg_rdata = rd[n];
  end
endmodule
