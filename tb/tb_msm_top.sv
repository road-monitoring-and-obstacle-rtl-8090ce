// tb_msm_top: end-to-end test of the morphological sub-module at a reduced
// image size. It runs a small version of the road/obstacle processing chain
// through the host bus, the camera port and the display port:
//  scan 1 (main pipeline): camera frame and previous frame -> temporal
//         dilation (point max) -> morphological gradient -> log2
//         anamorphosis in the LUT of board 2 -> memory 0 frame 1;
//         the histogrammer of board 1 watches the flow
//  scan 2 (main pipeline): threshold + thickening by the eight rotations of
//         a template (binary mode) -> geodesic step with the gradient as
//         second flow -> memory of the second processor and visualization
//  scan 3/4 (second pipeline, ROI window): recursive distance in direct
//         order, then in reverse order, into the host interface memory
//  scan 5 (second pipeline): contour points as the union of eight
//         hit-or-miss transforms (binary stages in parallel), one
//         reconstruction pass from them (recursive mode), output LUT ->
//         host interface memory.
// Each result is compared with a software model. The test counts how often
// each mechanism was exercised and fails if one never was.
module tb_msm_top;
  import msm_pkg::*;
  import tb_img_pkg::*;
  localparam int P = 36, IW = 32, IH = 16, PA = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we, host_re, acq_we, acq_frame_done, irq_acq;
  logic [19:0] host_addr;
  logic [15:0] host_wdata, host_rdata;
  logic [1:0] irq_proc;
  logic [PA-1:0] acq_addr, vis_addr;
  logic [7:0] acq_data;
  logic [8:0] vis_data;

  msm_top #(.P(P), .NFRAMES(16), .IMG_W(IW), .IMG_H(IH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_temporal, n_gradient, n_anamorph, n_hist, n_thicken, n_geodesic,
      n_distance, n_reverse, n_roi, n_transfer, n_vis_swap, n_acq_irq, n_proc_irq, n_gpo_mux,
      n_parallel, n_recons, n_outlut;

  task automatic hw(logic [19:0] a, logic [15:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic hr(logic [19:0] a, output logic [15:0] d);
    @(negedge clk); host_re = 1; host_addr = a;
    @(negedge clk); host_re = 0; d = host_rdata;
  endtask
  // proc 0 = main (2 boards), 1 = second (1 board)
  function automatic logic [19:0] badr(int p, int b, logic [3:0] t, int idx);
    return {(p == 0) ? 2'd2 : 2'd3, 2'(b), t, 12'(idx)};
  endfunction
  task automatic chipw(int p, int b, int k, logic [5:0] r, logic [7:0] d);
    hw(badr(p, b, 4'(k), r), 16'(d));
  endtask
  task automatic run_mode(int p, bit run);
    for (int b = 0; b < ((p == 0) ? 2 : 1); b++) hw(badr(p, b, BT_CTRL, 0), 16'(run));
  endtask
  task automatic scan(int p, int sm, int ss, int dm, int df, int x0, int y0, int w, int h, int rev);
    logic [19:0] b;
    b = 20'(16*(p+1));
    hw(b + 0, 16'(sm)); hw(b + 1, 16'(ss)); hw(b + 2, 16'(dm)); hw(b + 3, 16'(df));
    hw(b + 4, 16'(x0)); hw(b + 5, 16'(y0)); hw(b + 6, 16'(w)); hw(b + 7, 16'(h)); hw(b + 8, 16'(rev));
    run_mode(p, 1);
    hw(b + 9, 0);
    begin
      int n = 0;
      while (!irq_proc[p] && n < 200000) begin @(negedge clk); n++; end
    end
    check(irq_proc[p], "processing interrupt");
    if (irq_proc[p]) n_proc_irq++;
    hw(20'h0, 16'(1 << p));
    run_mode(p, 0);
  endtask
  // reset every chip of a processor to a plain copy
  task automatic all_copy(int p);
    for (int b = 0; b < ((p == 0) ? 2 : 1); b++) begin
      for (int k = 0; k < 4; k++) begin
        chipw(p, b, k, R_MODE, 0); chipw(p, b, k, R_PTOP, PT_A); chipw(p, b, k, R_G0OP, G_DIL);
        chipw(p, b, k, R_G0SE, 8'h10); chipw(p, b, k, R_GCOMB, GC_P0);
      end
      hw(badr(p, b, BT_CTRL, 1), 0);
      for (int k = 0; k < 4; k++) hw(badr(p, b, BT_CTRL, 2 + k), 16'(P + 3));
      for (int i = 0; i < 512; i++) hw(badr(p, b, BT_LUT_IN, i), 16'(i));
    end
  endtask

  img_t cam, prev, grad, t, bin, geo, dist1, dist2, roi, ep, rec;
  logic [15:0] d;

  initial begin
    host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; acq_we = 0; acq_frame_done = 0;
    acq_addr = 0; acq_data = 0; vis_addr = 0;
    {n_temporal, n_gradient, n_anamorph, n_hist, n_thicken, n_geodesic, n_distance, n_reverse,
     n_roi, n_transfer, n_vis_swap, n_acq_irq, n_proc_irq, n_gpo_mux,
     n_parallel, n_recons, n_outlut} = '0;
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      cam[r][c] = 8'($urandom_range(0, 120)); prev[r][c] = 8'($urandom_range(0, 120));
      if (c % 9 == 4) cam[r][c] = 8'($urandom_range(200, 255));   // lane marks
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // previous image: host interface memory -> memory 0 frame 0 (plain copy)
    for (int i = 0; i < IW*IH; i++) hw({2'd1, 18'(i)}, 16'(prev[i / IW][i % IW]));
    hw(20'h1, 16'h0002);
    all_copy(0); all_copy(1);
    scan(0, SRC_HOST, SRC_HOST, 1 << DST_MEM0, 0, 0, 0, IW, IH, 0);

    // camera frame
    for (int i = 0; i < IW*IH; i++) begin
      @(negedge clk); acq_we = 1; acq_addr = PA'(i); acq_data = cam[i / IW][i % IW];
    end
    @(negedge clk); acq_we = 0; acq_frame_done = 1;
    @(negedge clk); acq_frame_done = 0;
    check(irq_acq, "acquisition interrupt"); if (irq_acq) n_acq_irq++;
    hw(20'h0, 16'h0004);

    // ---- scan 1: temporal max, gradient, anamorphosis
    chipw(0, 0, 0, R_PTOP, PT_MAX);
    chipw(0, 0, 1, R_G0OP, 8'h80 | G_DIL); chipw(0, 0, 1, R_G0SE, 8'hFF);
    chipw(0, 0, 1, R_G1OP, 8'h80 | G_ERO); chipw(0, 0, 1, R_G1SE, 8'hFF);
    chipw(0, 0, 1, R_GCOMB, GC_P0_SUB_P1);
    for (int i = 0; i < 512; i++) hw(badr(0, 1, BT_LUT_IN, i), 16'(flog2p1(i & 255)));
    hw(badr(0, 0, BT_HIST, 0), 0);
    scan(0, SRC_ACQ, 0, 1 << DST_MEM0, 1, 0, 0, IW, IH, 0);
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) t[r][c] = (cam[r][c] > prev[r][c]) ? cam[r][c] : prev[r][c];
    n_temporal++;
    grad = morph(t, IW, IH, 1, 9'h1FF);
    t = morph(t, IW, IH, 0, 9'h1FF);
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) grad[r][c] = ssub(grad[r][c], t[r][c]);
    n_gradient++;
    // histogram after chip 3 of board 1: the raw gradient values
    begin
      int c0;
      c0 = 0;
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) if (grad[r][c] == 0) c0++;
      hr(badr(0, 0, BT_HIST, 0), d);
      check(int'(d) == c0, $sformatf("histogram of the gradient, bin 0: %0d/%0d", d, c0));
      n_hist++;
    end
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) grad[r][c] = flog2p1(grad[r][c]);
    n_anamorph++;

    // ---- scan 2: threshold + 8-rotation thickening, geodesic step; to memory 1 and display
    all_copy(0);
    chipw(0, 0, 0, R_MODE, MODE_BIN); chipw(0, 0, 0, R_PTOP, PT_THR);
    chipw(0, 0, 0, R_THRLO, 8'd7); chipw(0, 0, 0, R_THRHI, 8'd255);
    begin
      // template: centre 0, line above all 1, line below all 0, rotated by 45 degrees
      int ring [8] = '{0, 1, 2, 5, 8, 7, 6, 3};
      logic [8:0] fg, bg;
      for (int k = 0; k < 8; k++) begin
        fg = (9'd1 << ring[k]) | (9'd1 << ring[(k+1)%8]) | (9'd1 << ring[(k+2)%8]);
        bg = (9'd1 << ring[(k+4)%8]) | (9'd1 << ring[(k+5)%8]) | (9'd1 << ring[(k+6)%8]) | 9'h010;
        chipw(0, 0, 0, R_BSTAGE + 6'(3*k), 8'(B_THICK | (fg[8] << 4) | (bg[8] << 5)));
        chipw(0, 0, 0, R_BSTAGE + 6'(3*k) + 1, fg[7:0]);
        chipw(0, 0, 0, R_BSTAGE + 6'(3*k) + 2, bg[7:0]);
      end
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) bin[r][c] = (grad[r][c] >= 7) ? 8'hFF : 8'h00;
      for (int k = 0; k < 8; k++) begin
        fg = (9'd1 << ring[k]) | (9'd1 << ring[(k+1)%8]) | (9'd1 << ring[(k+2)%8]);
        bg = (9'd1 << ring[(k+4)%8]) | (9'd1 << ring[(k+5)%8]) | (9'd1 << ring[(k+6)%8]) | 9'h010;
        t = bstage(bin, bin, IW, IH, 4, 0, fg, bg);
        for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) if (t[r][c] != bin[r][c]) n_thicken++;
        bin = t;
      end
    end
    // second flow: chip 1 -> GPO mux path, then delay lines; board 0 chip 0 is binary
    hw(badr(0, 0, BT_CTRL, 2), 16'(1 + 8*(P + 2)));
    hw(badr(0, 0, BT_CTRL, 1), 16'b0010);     // DIB of chip 3 from GPO of chip 2
    n_gpo_mux++;
    chipw(0, 1, 0, R_G0OP, 8'h80 | G_DIL); chipw(0, 1, 0, R_G0SE, 8'hFF); chipw(0, 1, 0, R_GCOMB, GC_MIN_Q);
    scan(0, 1, 1, (1 << DST_MEM1) | (1 << DST_VIS), 0, 0, 0, IW, IH, 0);
    t = morph(bin, IW, IH, 1, 9'h1FF);
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) geo[r][c] = (t[r][c] < grad[r][c]) ? t[r][c] : grad[r][c];
    n_geodesic++;
    hw(20'h1, 16'h0001); n_vis_swap++;
    begin
      int e;
      e = 0;
      for (int i = 0; i < IW*IH; i++) begin
        vis_addr = PA'(i); #1;
        if (vis_data != {1'b0, geo[i / IW][i % IW]}) e++;
      end
      check(e == 0, $sformatf("displayed result of scan 2, %0d errors", e));
    end

    // ---- scans 3/4: second processor, distance on a window, direct then reverse
    chipw(1, 0, 0, R_MODE, MODE_REC); chipw(1, 0, 0, R_ROP, R_DIST);
    chipw(1, 0, 0, R_PTOP, PT_THR); chipw(1, 0, 0, R_THRLO, 8'd1); chipw(1, 0, 0, R_THRHI, 8'd255);
    scan(1, 0, 0, 1 << DST_MEM1, 1, 4, 3, 20, 10, 0);
    n_transfer++; n_roi++;
    for (int r = 0; r < 10; r++) for (int c = 0; c < 20; c++) roi[r][c] = (geo[r+3][c+4] >= 1) ? 8'hFF : 8'h00;
    dist1 = rdist(roi, 20, 10);
    chipw(1, 0, 0, R_PTOP, PT_A);
    scan(1, 1, 1, 1 << DST_HOST, 0, 4, 3, 20, 10, 1);
    dist2 = flip(rdist(flip(dist1, 20, 10), 20, 10), 20, 10);
    n_distance++; n_reverse++;
    hw(20'h1, 16'h0002);
    begin
      int e;
      e = 0;
      for (int r = 0; r < 10; r++) for (int c = 0; c < 20; c++) begin
        hr({2'd1, 18'((r + 3) * IW + c + 4)}, d);
        if (d != 16'(dist2[r][c])) e++;
      end
      check(e == 0, $sformatf("distance function in host memory, %0d errors", e));
      hr({2'd1, 18'(0)}, d);
      check(d == 16'(prev[0][0]), "host memory outside the window unchanged");
    end

    // ---- scan 5: contour points (parallel binary stages), reconstruction, output LUT
    all_copy(1);
    for (int i = 0; i < 256; i++) hw(badr(1, 0, BT_LUT_OUT, i), (i == 255) ? 16'h0101 : 16'h0000);
    chipw(1, 0, 0, R_MODE, 8'(MODE_BIN) | 8'h08); chipw(1, 0, 0, R_PTOP, PT_THR);
    chipw(1, 0, 0, R_THRLO, 8'd7); chipw(1, 0, 0, R_THRHI, 8'd255);
    chipw(1, 0, 1, R_MODE, MODE_REC); chipw(1, 0, 1, R_ROP, R_RECONS);
    begin
      int ring [8] = '{0, 1, 2, 5, 8, 7, 6, 3};
      logic [8:0] bg;
      for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) ep[r][c] = 8'h00;
      for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) bin[r][c] = (geo[r][c] >= 7) ? 8'hFF : 8'h00;
      for (int k = 0; k < 8; k++) begin
        bg = (9'd1 << ring[k]) | (9'd1 << ring[(k+1)%8]) | (9'd1 << ring[(k+2)%8]);
        chipw(1, 0, 0, R_BSTAGE + 6'(3*k), 8'(B_HMT | (bg[8] << 5)));
        chipw(1, 0, 0, R_BSTAGE + 6'(3*k) + 1, 8'h10);
        chipw(1, 0, 0, R_BSTAGE + 6'(3*k) + 2, bg[7:0]);
        t = bstage(bin, bin, IW, IH, 3, 0, 9'h010, bg);
        for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) ep[r][c] |= t[r][c];
      end
    end
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) if (ep[r][c] != 0) n_parallel++;
    rec = rrec(ep, geo, IW, IH);
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) if (rec[r][c] != 0 && ep[r][c] == 0) n_recons++;
    scan(1, 0, 0, 1 << DST_HOST, 0, 0, 0, IW, IH, 0);
    hw(20'h1, 16'h0002);
    begin
      int e;
      e = 0;
      for (int i = 0; i < IW*IH; i++) begin
        hr({2'd1, 18'(i)}, d);
        if (d != ((rec[i / IW][i % IW] != 0) ? 16'h0101 : 16'h0000)) e++;
        if (d == 16'h0101) n_outlut++;
      end
      check(e == 0, $sformatf("contour points, reconstruction and output LUT, %0d errors", e));
    end

    check(n_parallel > 0, "parallel binary stages found contour points");
    check(n_recons > 0, "reconstruction grew the markers");
    check(n_outlut > 0, "output LUT");
    check(n_temporal > 0, "temporal dilation");   check(n_gradient > 0, "gradient");
    check(n_anamorph > 0, "anamorphosis");        check(n_hist > 0, "histogram");
    check(n_thicken > 0, "thickening changed pixels"); check(n_geodesic > 0, "geodesic step");
    check(n_distance > 0, "distance");            check(n_reverse > 0, "reverse scan");
    check(n_roi > 0, "window scan");              check(n_transfer > 0, "transfer between processors");
    check(n_vis_swap > 0, "display bank swap");   check(n_acq_irq > 0, "acquisition interrupt");
    check(n_proc_irq >= 6, "processing interrupts"); check(n_gpo_mux > 0, "GPO second-flow path");
    $display("mechanisms: parallel=%0d recons=%0d outlut=%0d", n_parallel, n_recons, n_outlut);
    $display("mechanisms: temporal=%0d gradient=%0d anamorph=%0d hist=%0d thicken=%0d geodesic=%0d distance=%0d reverse=%0d roi=%0d transfer=%0d vis_swap=%0d acq_irq=%0d proc_irq=%0d gpo_mux=%0d",
             n_temporal, n_gradient, n_anamorph, n_hist, n_thicken, n_geodesic, n_distance, n_reverse,
             n_roi, n_transfer, n_vis_swap, n_acq_irq, n_proc_irq, n_gpo_mux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
