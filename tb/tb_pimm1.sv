// tb_pimm1: self-checking test of the PIMM1 chip with its external delay line.
//
// Programs the chip through its programming pins, sends raster frames
// (W x H pixels, P clocks per line) and rebuilds the output image from the
// HENO/VENO framing. Covers the point operators, both greytone processors
// and their combinations (gradient, geodesic step with the second flow),
// the eight-stage binary pipeline and the recursive distance and
// reconstruction operators in direct and reverse order. Every output image
// is compared with tb_img_pkg; the latency from the first input pixel to
// the first output pixel is checked against P+3 (greytone, recursive) and
// 1+8(P+2) (binary), and every frame must come out at one pixel per clock.
module tb_pimm1;
  import msm_pkg::*;
  import tb_img_pkg::*;

  localparam int P = 14, W = 10, H = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] dia, dib, dic, dio, gpo, datao, datai;
  logic heni, veni, heno, veno, proc_progn, csn, rwn;
  logic [5:0] add;
  logic [23:0] dl_to, dl_from;

  pimm1 #(.P(P)) dut (.*);
  line_delay #(.WIDTH(24), .DEPTH(P)) u_dl (.clk(clk), .rst_n(rst_n), .din(dl_to), .dout(dl_from));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [5:0] a, logic [7:0] d);
    @(negedge clk); csn = 0; rwn = 0; add = a; datai = d;
    @(negedge clk); csn = 1; rwn = 1;
  endtask

  img_t ia, ib, io, ig;
  int lat, span;

  // drive one frame, collect the output image
  task automatic run_frame();
    int n, first_in, first_out, last_out, oc;
    n = 0; first_out = -1; oc = 0; first_in = 0; last_out = 0;
    fork
      begin
        for (int r = 0; r < H; r++)
          for (int c = 0; c < P; c++) begin
            @(negedge clk);
            heni = (c < W); veni = 1;
            dia = (c < W) ? ia[r][c] : 8'h00;
            dib = (c < W) ? ib[r][c] : 8'h00;
          end
        @(negedge clk); heni = 0; veni = 0;
      end
      begin
        int cyc;
        cyc = 0;
        while (oc < W*H && cyc < 20*P*H) begin
          @(negedge clk); cyc++;
          if (heno && veno) begin
            if (first_out < 0) first_out = cyc;
            last_out = cyc;
            io[oc / W][oc % W] = dio;
            ig[oc / W][oc % W] = gpo;
            oc++;
          end
        end
      end
    join
    lat = first_out - 1;   // first input pixel is driven at negedge 1
    span = last_out - first_out + 1;
    check(oc == W*H, "output pixel count");
    check(span == (H-1)*P + W, "one pixel per clock");
    repeat (3*P) @(negedge clk);
  endtask

  function automatic int cmp(img_t a, img_t b);
    int e = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (a[r][c] !== b[r][c]) e++;
    return e;
  endfunction

  img_t ref1, ref2, t;
  int e;

  initial begin
    heni = 0; veni = 0; dia = 0; dib = 0; dic = 0; csn = 1; rwn = 1; add = 0; datai = 0;
    proc_progn = 0;
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      ia[r][c] = 8'($urandom_range(0, 255));
      ib[r][c] = 8'($urandom_range(0, 255));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- greytone: gradient dilation(3x3) - erosion(cross), GPO = erosion
    wr(R_MODE, 8'h04); wr(R_PTOP, PT_A);
    wr(R_G0OP, 8'h80 | G_DIL); wr(R_G0SE, 8'hFF);
    wr(R_G1OP, G_ERO); wr(R_G1SE, 8'hBA); wr(R_GCOMB, GC_P0_SUB_P1);
    @(negedge clk); csn = 0; rwn = 1; add = R_G1SE; #1 check(datao == 8'hBA, "register read-back");
    @(negedge clk); csn = 1;
    // locked in processing phase
    proc_progn = 1; wr(R_G1SE, 8'h00); proc_progn = 0;
    @(negedge clk); csn = 0; rwn = 1; add = R_G1SE; #1 check(datao == 8'hBA, "registers locked while processing");
    @(negedge clk); csn = 1;
    proc_progn = 1;
    run_frame();
    ref1 = morph(ia, W, H, 1, 9'h1FF); ref2 = morph(ia, W, H, 0, 9'h0BA);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) t[r][c] = ssub(ref1[r][c], ref2[r][c]);
    e = cmp(io, t); check(e == 0, $sformatf("gradient, %0d pixel errors", e));
    e = cmp(ig, ref2); check(e == 0, $sformatf("GPO erosion, %0d pixel errors", e));
    check(lat == P + 3, $sformatf("greytone latency %0d", lat));

    // ---- geodesic dilation step min(dilate(A), B); GPO = B realigned
    proc_progn = 0;
    wr(R_MODE, 8'h00); wr(R_GCOMB, GC_MIN_Q);
    proc_progn = 1;
    run_frame();
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      t[r][c] = (ref1[r][c] < ib[r][c]) ? ref1[r][c] : ib[r][c];
    e = cmp(io, t); check(e == 0, $sformatf("geodesic step, %0d errors", e));
    e = cmp(ig, ib); check(e == 0, $sformatf("GPO second flow, %0d errors", e));

    // ---- point operators through a centre-only SE
    proc_progn = 0;
    wr(R_G0OP, G_DIL); wr(R_G0SE, 8'h10); wr(R_GCOMB, GC_P0);
    foreach (ref1[r, c]) ref1[r][c] = 0;
    for (int op = 0; op < 12; op++) begin
      proc_progn = 0;
      wr(R_PTOP, 8'(op)); wr(R_THRLO, 8'd60); wr(R_THRHI, 8'd180);
      proc_progn = 1;
      dic = 8'(op & 1);
      run_frame();
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        logic [7:0] a, b;
        a = ia[r][c]; b = ib[r][c];
        case (op)
          0: t[r][c] = a;            1: t[r][c] = sadd(a, b);
          2: t[r][c] = ssub(a, b);   3: t[r][c] = (a < b) ? a : b;
          4: t[r][c] = (a > b) ? a : b;
          5: t[r][c] = (a >= 60 && a <= 180) ? 8'hFF : 8'h00;
          6: t[r][c] = a & b;        7: t[r][c] = a | b;
          8: t[r][c] = a ^ b;        9: t[r][c] = ~a;
          10: t[r][c] = (op & 1) ? a : b;
          default: t[r][c] = b;
        endcase
      end
      e = cmp(io, t); check(e == 0, $sformatf("point op %0d, %0d errors", op, e));
    end
    dic = 0;

    // ---- binary pipeline: threshold then eight different stages
    proc_progn = 0;
    wr(R_MODE, MODE_BIN); wr(R_PTOP, PT_THR); wr(R_THRLO, 8'd100); wr(R_THRHI, 8'd255);
    begin
      int ops [8] = '{4, 1, 2, 3, 5, 6, 0, 0};
      logic [8:0] fgs [8] = '{9'h010, 9'h0BA, 9'h1FF, 9'h030, 9'h013, 9'h000, 9'h000, 9'h000};
      logic [8:0] bgs [8] = '{9'h1C0, 9'h000, 9'h000, 9'h100, 9'h180, 9'h000, 9'h000, 9'h000};
      bit geos [8] = '{0, 0, 0, 0, 0, 0, 1, 0};
      for (int k = 0; k < 8; k++) begin
        wr(R_BSTAGE + 6'(3*k), 8'(ops[k] | (geos[k] << 3) | (fgs[k][8] << 4) | (bgs[k][8] << 5)));
        wr(R_BSTAGE + 6'(3*k) + 6'd1, fgs[k][7:0]);
        wr(R_BSTAGE + 6'(3*k) + 6'd2, bgs[k][7:0]);
      end
      proc_progn = 1;
      run_frame();
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) t[r][c] = (ia[r][c] >= 100) ? 8'hFF : 8'h00;
      for (int k = 0; k < 8; k++) t = bstage(t, ib, W, H, ops[k], geos[k], fgs[k], bgs[k]);
      e = cmp(io, t); check(e == 0, $sformatf("binary pipeline, %0d errors", e));
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) t[r][c] = {8{ib[r][c][0]}};
      e = cmp(ig, t); check(e == 0, $sformatf("binary mask realigned, %0d errors", e));
      check(lat == 1 + 8*(P+2), $sformatf("binary latency %0d", lat));
    end

    // ---- recursive distance: direct scan, then reverse scan of the result
    proc_progn = 0;
    wr(R_MODE, MODE_REC); wr(R_ROP, R_DIST); wr(R_PTOP, PT_THR); wr(R_THRLO, 8'd40); wr(R_THRHI, 8'd255);
    proc_progn = 1;
    run_frame();
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) t[r][c] = (ia[r][c] >= 40) ? 8'hFF : 8'h00;
    ref1 = rdist(t, W, H);
    e = cmp(io, ref1); check(e == 0, $sformatf("distance direct scan, %0d errors", e));
    check(lat == P + 3, $sformatf("recursive latency %0d", lat));
    proc_progn = 0; wr(R_PTOP, PT_A); proc_progn = 1;
    ia = flip(io, W, H);
    run_frame();
    ref2 = flip(rdist(flip(ref1, W, H), W, H), W, H);
    t = flip(io, W, H);
    e = cmp(t, ref2); check(e == 0, $sformatf("distance reverse scan, %0d errors", e));
    // exact city-block distance check on every pixel
    begin
      int bad = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        int best, d;
        best = 255;
        for (int r2 = 0; r2 < H; r2++) for (int c2 = 0; c2 < W; c2++)
          if (ref1[r2][c2] == 0) begin
            d = ((r > r2) ? r - r2 : r2 - r) + ((c > c2) ? c - c2 : c2 - c);
            if (d < best) best = d;
          end
        if (int'(t[r][c]) != best) bad++;
      end
      check(bad == 0, $sformatf("city-block distance, %0d errors", bad));
    end

    // ---- recursive reconstruction of mask particles from a marker
    proc_progn = 0; wr(R_ROP, R_RECONS); proc_progn = 1;
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      ia[r][c] = ($urandom_range(0, 15) == 0) ? 8'hFF : 8'h00;
      ib[r][c] = ($urandom_range(0, 2) != 0) ? 8'hFF : 8'h00;
    end
    run_frame();
    ref1 = rrec(ia, ib, W, H);
    e = cmp(io, ref1); check(e == 0, $sformatf("reconstruction direct scan, %0d errors", e));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
