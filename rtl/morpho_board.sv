// morpho_board: one morphological processor board.
//
// Four PIMM1 chips in pipeline, each with its 24-bit external line delay.
// The main flow (9-bit DIABUS) goes through an input LUT (anamorphosis) into
// DIA of chip 1 and from DIO of each chip to DIA of the next; the last DIO
// goes through an output LUT to the 9-bit DIOBUS. The second flow (DIBBUS)
// feeds DIB of chip 1 and a chain of four re-synchronisation delay lines;
// in front of DIB of chip n+1 a multiplexer takes either GPO of chip n or
// the delayed original second flow, and the last multiplexer drives DIBOBUS.
// DIC of chip 1 receives bit 8 of the input LUT output (the 9th, binary
// plane) replicated to 8 bits, DIC of chip n+1 receives GPO of chip n.
// A histogrammer (HIST=1) watches the output of chip 3.
//
// Host access (cfg_*): address [15:12] target, [11:0] index, see msm_pkg.
// Writes take one clock; cfg_rdata is combinational.
//
// Latency DIABUS->DIOBUS: 2 + sum of the four chip latencies.
// The structure (LUTs, chips, delay lines, muxes, histogrammer tap) follows
// the board diagram. The DIC connections, the programmable delay depth and
// the register map are this design's reading of it.
module morpho_board
  import msm_pkg::*;
#(
  parameter int P     = 264,   // clocks per video line
  parameter int NCHIP = 4,
  parameter bit HIST  = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // morphobus input
  input  logic [8:0]  diabus,
  input  logic [7:0]  dibbus,
  input  logic        hen,
  input  logic        ven,
  // morphobus output
  output logic [8:0]  diobus,
  output logic [7:0]  dibobus,
  output logic        heno,
  output logic        veno,
  // host access
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [15:0] cfg_wdata,
  output logic [15:0] cfg_rdata
);
  localparam int MAXD = NBSTAGE*(P+2) + 2;

  wire [3:0]  tgt = cfg_addr[15:12];
  wire [11:0] idx = cfg_addr[11:0];

  // ---------------- board registers ----------------
  logic        proc_run;
  logic [NCHIP-1:0] mux_gpo;
  logic [15:0] depth [NCHIP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      proc_run <= 1'b0;
      mux_gpo  <= '0;
      for (int k = 0; k < NCHIP; k++) depth[k] <= 16'(P + 3);
    end else if (cfg_we && tgt == BT_CTRL) begin
      if (idx == 12'd0) proc_run <= cfg_wdata[0];
      if (idx == 12'd1) mux_gpo  <= cfg_wdata[NCHIP-1:0];
      for (int k = 0; k < NCHIP; k++)
        if (idx == 12'(2 + k)) depth[k] <= cfg_wdata;
    end
  end

  // ---------------- input LUT and aligned side signals ----------------
  logic [8:0] lut_in_q, lut_in_rd;
  logic [7:0] dib0;
  logic       hen0, ven0;

  morpho_lut #(.AW(9), .DW(9)) u_lut_in (
    .clk(clk), .rst_n(rst_n), .din(diabus), .dout(lut_in_q),
    .we(cfg_we && tgt == BT_LUT_IN), .addr(idx[8:0]), .wdata(cfg_wdata[8:0]),
    .rdata(lut_in_rd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dib0 <= '0; hen0 <= 1'b0; ven0 <= 1'b0;
    end else begin
      dib0 <= dibbus; hen0 <= hen; ven0 <= ven;
    end
  end

  // ---------------- chips ----------------
  logic [7:0]  dia [NCHIP+1];
  logic [7:0]  dib [NCHIP];
  logic [7:0]  dic [NCHIP];
  logic [7:0]  gpo [NCHIP];
  logic [7:0]  dlo [NCHIP+1];    // re-synchronisation chain
  logic        hv_h [NCHIP+1];
  logic        hv_v [NCHIP+1];
  logic [7:0]  datao [NCHIP];

  assign dia[0]  = lut_in_q[7:0];
  assign dib[0]  = dib0;
  assign dic[0]  = {8{lut_in_q[8]}};
  assign dlo[0]  = dib0;
  assign hv_h[0] = hen0;
  assign hv_v[0] = ven0;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    logic [23:0] dl_to, dl_from;

    pimm1 #(.P(P)) u_pimm1 (
      .clk(clk), .rst_n(rst_n),
      .dia(dia[k]), .dib(dib[k]), .dic(dic[k]), .heni(hv_h[k]), .veni(hv_v[k]),
      .dio(dia[k+1]), .gpo(gpo[k]), .heno(hv_h[k+1]), .veno(hv_v[k+1]),
      .dl_to(dl_to), .dl_from(dl_from),
      .proc_progn(proc_run), .csn(tgt != 4'(k)), .rwn(!cfg_we),
      .add(idx[5:0]), .datai(cfg_wdata[7:0]), .datao(datao[k])
    );

    line_delay #(.WIDTH(24), .DEPTH(P)) u_dl (
      .clk(clk), .rst_n(rst_n), .din(dl_to), .dout(dl_from)
    );

    resync_delay #(.W(8), .MAXD(MAXD)) u_resync (
      .clk(clk), .rst_n(rst_n), .depth(depth[k]), .din(dlo[k]), .dout(dlo[k+1])
    );

    if (k + 1 < NCHIP) begin : g_next
      assign dib[k+1] = mux_gpo[k] ? gpo[k] : dlo[k+1];
      assign dic[k+1] = gpo[k];
    end
  end

  // ---------------- output LUT ----------------
  logic [8:0] lut_out_rd;
  logic [7:0] dibo_d;

  morpho_lut #(.AW(8), .DW(9)) u_lut_out (
    .clk(clk), .rst_n(rst_n), .din(dia[NCHIP]), .dout(diobus),
    .we(cfg_we && tgt == BT_LUT_OUT), .addr(idx[7:0]), .wdata(cfg_wdata[8:0]),
    .rdata(lut_out_rd)
  );

  assign dibo_d = mux_gpo[NCHIP-1] ? gpo[NCHIP-1] : dlo[NCHIP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dibobus <= '0; heno <= 1'b0; veno <= 1'b0;
    end else begin
      dibobus <= dibo_d; heno <= hv_h[NCHIP]; veno <= hv_v[NCHIP];
    end
  end

  // ---------------- histogrammer ----------------
  logic [16:0] hist_rd;
  if (HIST) begin : g_hist
    localparam int TAP = (NCHIP >= 3) ? 3 : NCHIP;
    histogrammer #(.CW(17)) u_hist (
      .clk(clk), .rst_n(rst_n), .d(dia[TAP]), .v(hv_h[TAP] & hv_v[TAP]),
      .clr(cfg_we && tgt == BT_HIST), .raddr(idx[7:0]), .rdata(hist_rd)
    );
  end else begin : g_nohist
    assign hist_rd = '0;
  end

  // ---------------- host read ----------------
  always_comb begin
    cfg_rdata = '0;
    if (tgt < 4'(NCHIP)) cfg_rdata = {8'h00, datao[tgt[1:0]]};
    else unique case (tgt)
      BT_LUT_IN:  cfg_rdata = {7'h00, lut_in_rd};
      BT_LUT_OUT: cfg_rdata = {7'h00, lut_out_rd};
      BT_HIST:    cfg_rdata = hist_rd[15:0] | ((hist_rd[16]) ? 16'hFFFF : 16'h0000);
      BT_CTRL: begin
        if (idx == 12'd0) cfg_rdata = {15'h0, proc_run};
        else if (idx == 12'd1) cfg_rdata = 16'(mux_gpo);
        else if (idx >= 12'd2 && idx < 12'(2 + NCHIP)) cfg_rdata = depth[idx[1:0] - 2'd2];
      end
      default: cfg_rdata = '0;
    endcase
  end
endmodule
