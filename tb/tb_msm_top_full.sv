// tb_msm_top_full: the morphological sub-module at its full size (256x256
// images, 264-clock lines, 16 frames per memory, two boards of four PIMM1 in
// the main pipeline). One complete operation: a 256x256 image is written
// through the host interface memory, the main pipeline computes its 3x3
// morphological gradient followed by the log2 anamorphosis of the second
// board's input LUT, and the result is written to memory 0 and to the
// visualization buffer. The displayed image is compared with a software
// model, and the scan time is checked against one pixel per clock.
module tb_msm_top_full;
  import msm_pkg::*;
  localparam int W = 256, H = 256, PA = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we, host_re, acq_we, acq_frame_done, irq_acq;
  logic [19:0] host_addr;
  logic [15:0] host_wdata, host_rdata;
  logic [1:0] irq_proc;
  logic [PA-1:0] acq_addr, vis_addr;
  logic [7:0] acq_data;
  logic [8:0] vis_data;

  msm_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic hw(logic [19:0] a, logic [15:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  function automatic logic [19:0] badr(int b, logic [3:0] t, int idx);
    return {2'd2, 2'(b), t, 12'(idx)};
  endfunction
  function automatic logic [7:0] flog2p1(int f);
    int k = 0;
    while ((1 << (k + 1)) <= f + 1) k++;
    return 8'(k);
  endfunction

  logic [7:0] img [H][W];
  logic [7:0] expd [H][W];
  int t0, t1, e;

  initial begin
    host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; acq_we = 0; acq_frame_done = 0;
    acq_addr = 0; acq_data = 0; vis_addr = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      img[r][c] = 8'((r * 3 + c * 5) ^ $urandom_range(0, 63));
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      logic [7:0] mx, mn;
      mx = 0; mn = 255;
      for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
        if (r + dr >= 0 && r + dr < H && c + dc >= 0 && c + dc < W) begin
          if (img[r+dr][c+dc] > mx) mx = img[r+dr][c+dc];
          if (img[r+dr][c+dc] < mn) mn = img[r+dr][c+dc];
        end
      expd[r][c] = flog2p1(int'(mx) - int'(mn));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int i = 0; i < W*H; i++) hw({2'd1, 18'(i)}, 16'(img[i / W][i % W]));
    hw(20'h1, 16'h0002);                               // host banks swap
    // board 0 chip 0: gradient; the other chips copy; board 1 input LUT: log2
    for (int b = 0; b < 2; b++) for (int k = 0; k < 4; k++) begin
      hw(badr(b, 4'(k), R_MODE), 0); hw(badr(b, 4'(k), R_PTOP), 16'(PT_A));
      hw(badr(b, 4'(k), R_G0OP), 16'(G_DIL)); hw(badr(b, 4'(k), R_G0SE), 16'h10);
      hw(badr(b, 4'(k), R_GCOMB), 16'(GC_P0));
    end
    hw(badr(0, 0, R_G0OP), 16'h80 | 16'(G_DIL)); hw(badr(0, 0, R_G0SE), 16'hFF);
    hw(badr(0, 0, R_G1OP), 16'h80 | 16'(G_ERO)); hw(badr(0, 0, R_G1SE), 16'hFF);
    hw(badr(0, 0, R_GCOMB), 16'(GC_P0_SUB_P1));
    for (int i = 0; i < 512; i++) hw(badr(1, BT_LUT_IN, i), 16'(flog2p1(i & 255)));
    hw(badr(0, BT_CTRL, 0), 1); hw(badr(1, BT_CTRL, 0), 1);
    // processor 0: host memory -> memory 0 frame 3 and display
    hw(20'h10, 16'(SRC_HOST)); hw(20'h11, 16'(SRC_HOST));
    hw(20'h12, 16'((1 << DST_MEM0) | (1 << DST_VIS))); hw(20'h13, 3);
    hw(20'h19, 0);
    t0 = 0;
    while (!irq_proc[0] && t0 < 400000) begin @(negedge clk); t0++; end
    check(irq_proc[0], "end of processing interrupt");
    // one pixel per clock: the scan lasts about H lines of P clocks plus the pipeline latency
    check(t0 >= W * H && t0 < H * 264 + 2 * (2 + 4 * 267) + 2000, $sformatf("scan time %0d clocks", t0));
    hw(20'h1, 16'h0001);                               // display banks swap
    e = 0;
    for (int i = 0; i < W*H; i++) begin
      vis_addr = PA'(i); #1;
      if (vis_data != {1'b0, expd[i / W][i % W]}) begin
        e++;
        if (e < 5) $display("pixel %0d,%0d: %0d expected %0d", i / W, i % W, vis_data, expd[i / W][i % W]);
      end
    end
    check(e == 0, $sformatf("full-size gradient + anamorphosis, %0d pixel errors", e));
    $display("scan of a 256x256 image: %0d clocks", t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
