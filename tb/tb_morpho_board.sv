// tb_morpho_board: one processor board (input LUT, four PIMM1 with delay
// lines, second-flow delay lines and multiplexers, output LUT,
// histogrammer), programmed through its host port.
//  1. four steps of geodesic dilation in one scan: every chip dilates and
//     takes the minimum with the mask; the mask reaches chips 2 and 3 through
//     the GPO multiplexers, chips 4 and the output through the
//     re-synchronisation delay lines;
//  2. log2 anamorphosis in the input LUT, copied through the chips; the
//     histogrammer after chip 3 must count the nine levels;
//  3. a binary chip in the middle of greytone chips: the board latency must
//     be 2 + 3(P+3) + 1 + 8(P+2) clocks.
module tb_morpho_board;
  import msm_pkg::*;
  import tb_img_pkg::*;
  localparam int P = 14, W = 10, H = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [8:0] diabus, diobus;
  logic [7:0] dibbus, dibobus;
  logic hen, ven, heno, veno, cfg_we;
  logic [15:0] cfg_addr, cfg_wdata, cfg_rdata;
  morpho_board #(.P(P), .NCHIP(4), .HIST(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(logic [3:0] tgt, logic [11:0] idx, logic [15:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = {tgt, idx}; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic chip_all(logic [5:0] r, logic [7:0] d);
    for (int k = 0; k < 4; k++) wr(4'(k), 12'(r), 16'(d));
  endtask

  img_t ia, ib, io, ig;
  logic [8:0] a9 [MAXH][MAXW];
  int lat;

  task automatic run();
    int oc, first, cyc;
    oc = 0; first = -1; cyc = 0;
    wr(BT_CTRL, 0, 1);
    fork
      begin
        for (int r = 0; r < H; r++) for (int c = 0; c < P; c++) begin
          @(negedge clk);
          hen = (c < W); ven = 1;
          diabus = (c < W) ? a9[r][c] : 9'd0;
          dibbus = (c < W) ? ib[r][c] : 8'd0;
        end
        @(negedge clk); hen = 0; ven = 0;
      end
      while (oc < W*H && cyc < 40*P*H) begin
        @(negedge clk); cyc++;
        if (heno && veno) begin
          if (first < 0) first = cyc;
          io[oc / W][oc % W] = diobus[7:0];
          ig[oc / W][oc % W] = dibobus;
          check(diobus[8] == 1'b0, "output bit 8");
          oc++;
        end
      end
    join
    lat = first - 1;
    check(oc == W*H, "pixel count");
    wr(BT_CTRL, 0, 0);
  endtask

  function automatic int ndiff(img_t a, img_t b);
    int e = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (a[r][c] !== b[r][c]) e++;
    return e;
  endfunction

  img_t t;
  initial begin
    diabus = 0; dibbus = 0; hen = 0; ven = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. four geodesic dilation steps
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      ia[r][c] = ($urandom_range(0, 12) == 0) ? 8'($urandom_range(100, 255)) : 8'd0;
      ib[r][c] = 8'($urandom_range(0, 255));
      a9[r][c] = {1'b0, ia[r][c]};
    end
    chip_all(R_G0OP, 8'h80 | G_DIL); chip_all(R_G0SE, 8'hFF); chip_all(R_GCOMB, GC_MIN_Q);
    wr(BT_CTRL, 1, 16'b0011);                  // chips 2,3 get DIB from GPO
    for (int k = 0; k < 4; k++) wr(BT_CTRL, 12'(2 + k), 16'(P + 3));
    @(negedge clk); cfg_addr = {4'd2, 12'(R_GCOMB)}; #1 check(cfg_rdata == 16'(GC_MIN_Q), "chip register read");
    cfg_addr = {BT_CTRL, 12'd1}; #1 check(cfg_rdata == 16'b0011, "mux register read");
    run();
    t = ia;
    for (int k = 0; k < 4; k++) begin
      t = morph(t, W, H, 1, 9'h1FF);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (ib[r][c] < t[r][c]) t[r][c] = ib[r][c];
    end
    check(ndiff(io, t) == 0, $sformatf("4-step geodesic dilation, %0d errors", ndiff(io, t)));
    check(ndiff(ig, ib) == 0, "second flow realigned at the output");
    check(lat == 2 + 4*(P + 3), $sformatf("greytone board latency %0d", lat));

    // ---- 2. anamorphosis + histogram
    for (int i = 0; i < 512; i++) wr(BT_LUT_IN, 12'(i), 16'(flog2p1(i & 255)));
    chip_all(R_G0OP, G_DIL); chip_all(R_G0SE, 8'h10); chip_all(R_GCOMB, GC_P0);
    wr(BT_HIST, 0, 0);
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      a9[r][c] = 9'($urandom_range(0, 511));
      ia[r][c] = flog2p1(a9[r][c] & 255);
    end
    run();
    check(ndiff(io, ia) == 0, $sformatf("log2 anamorphosis, %0d errors", ndiff(io, ia)));
    begin
      int cnt [9];
      foreach (cnt[i]) cnt[i] = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) cnt[ia[r][c]]++;
      for (int i = 0; i < 9; i++) begin
        @(negedge clk); cfg_addr = {BT_HIST, 12'(i)};
        #1 check(int'(cfg_rdata) == cnt[i], $sformatf("histogram bin %0d: %0d exp %0d", i, cfg_rdata, cnt[i]));
      end
      cfg_addr = {BT_HIST, 12'd9}; #1 check(cfg_rdata == 0, "histogram empty bin");
    end

    // ---- 3. chip 2 in binary mode: erosion by the 3x3 square of a threshold
    for (int i = 0; i < 512; i++) wr(BT_LUT_IN, 12'(i), 16'(i));
    wr(4'd1, R_MODE, MODE_BIN); wr(4'd1, R_PTOP, PT_THR); wr(4'd1, R_THRLO, 8'd90);
    wr(4'd1, R_BSTAGE, B_ERO | 8'h10); wr(4'd1, R_BSTAGE + 1, 8'hFF);
    wr(BT_CTRL, 1, 16'b0000);
    wr(BT_CTRL, 3, 16'(1 + 8*(P + 2)));
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      ia[r][c] = 8'($urandom); a9[r][c] = {1'b0, ia[r][c]};
    end
    run();
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) t[r][c] = (ia[r][c] >= 90) ? 8'hFF : 8'h00;
    t = bstage(t, t, W, H, 2, 0, 9'h1FF, 9'h000);
    check(ndiff(io, t) == 0, $sformatf("binary erosion in chip 2, %0d errors", ndiff(io, t)));
    check(ndiff(ig, ib) == 0, "second flow through delay lines");
    check(lat == 2 + 3*(P + 3) + 1 + 8*(P + 2), $sformatf("mixed board latency %0d", lat));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
