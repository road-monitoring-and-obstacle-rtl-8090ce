// tb_pipeline_processor: the main pipeline processor, two boards (eight
// PIMM1) on one morphobus chain. Every chip of board 0 dilates by the 3x3
// square and every chip of board 1 erodes by it except the last, which
// dilates, so a single scan performs eight neighbourhood steps. Output and
// latency 2*(2 + 4(P+3)) are checked; board selection of the host port and
// the histogrammer present only on board 0 are checked too.
module tb_pipeline_processor;
  import msm_pkg::*;
  import tb_img_pkg::*;
  localparam int P = 26, W = 22, H = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [8:0] main_in, result;
  logic [7:0] second_in, second_out;
  logic hen, ven, heno, veno, cfg_we;
  logic [17:0] cfg_addr;
  logic [15:0] cfg_wdata, cfg_rdata;
  pipeline_processor #(.P(P), .NBOARDS(2), .HIST_MASK(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(int b, logic [3:0] tgt, logic [11:0] idx, logic [15:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = {2'(b), tgt, idx}; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  img_t ia, io, t;
  initial begin
    int oc, first, cyc, e;
    main_in = 0; second_in = 0; hen = 0; ven = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) for (int k = 0; k < 4; k++) begin
      wr(b, 4'(k), R_G0OP, 8'h80 | ((b == 1 && k < 3) ? G_ERO : G_DIL));
      wr(b, 4'(k), R_G0SE, 8'hFF);
    end
    wr(0, BT_HIST, 0, 0);
    for (int b = 0; b < 2; b++) wr(b, BT_CTRL, 0, 1);
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) ia[r][c] = 8'($urandom);
    oc = 0; first = -1; cyc = 0;
    fork
      begin
        for (int r = 0; r < H; r++) for (int c = 0; c < P; c++) begin
          @(negedge clk);
          hen = (c < W); ven = 1; main_in = (c < W) ? {1'b0, ia[r][c]} : 9'd0;
        end
        @(negedge clk); hen = 0; ven = 0;
      end
      while (oc < W*H && cyc < 20*P*H) begin
        @(negedge clk); cyc++;
        if (heno && veno) begin
          if (first < 0) first = cyc;
          io[oc / W][oc % W] = result[7:0];
          oc++;
        end
      end
    join
    t = ia;
    for (int k = 0; k < 4; k++) t = morph(t, W, H, 1, 9'h1FF);
    for (int k = 0; k < 3; k++) t = morph(t, W, H, 0, 9'h1FF);
    t = morph(t, W, H, 1, 9'h1FF);
    e = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (io[r][c] !== t[r][c]) e++;
    check(oc == W*H, "pixel count");
    check(e == 0, $sformatf("eight chained steps, %0d errors", e));
    check(first - 1 == 2*(2 + 4*(P + 3)), $sformatf("latency %0d", first - 1));
    // histogram of board 0 (after its third chip = three dilations)
    begin
      int cnt255;
      img_t d3;
      d3 = ia;
      for (int k = 0; k < 3; k++) d3 = morph(d3, W, H, 1, 9'h1FF);
      cnt255 = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (d3[r][c] == 8'd255) cnt255++;
      @(negedge clk); cfg_addr = {2'd0, BT_HIST, 12'd255};
      #1 check(int'(cfg_rdata) == cnt255, "histogram on board 0");
      cfg_addr = {2'd1, BT_HIST, 12'd255};
      #1 check(cfg_rdata == 0, "no histogrammer on board 1");
      cfg_addr = {2'd1, 4'd0, 12'(R_G0OP)};
      #1 check(cfg_rdata == 16'h0081, "board 1 chip register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
