// tb_img_pkg: reference image operations for the testbenches.
//
// Straightforward software versions of what the hardware computes, written
// on whole images held in arrays (at most MAXH x MAXW), so that the
// testbenches can compare pixel by pixel. Structuring-element bit 3*r+c,
// r = 0 line above, c = 0 left, bit 4 centre. Pixels outside the image are
// ignored by dilation/erosion and read as 0 by the binary template test.
package tb_img_pkg;
  localparam int MAXW = 40;
  localparam int MAXH = 40;
  typedef logic [7:0] img_t [MAXH][MAXW];

  function automatic logic in_img(int r, int c, int w, int h);
    return r >= 0 && r < h && c >= 0 && c < w;
  endfunction

  // greytone dilation (dil=1) or erosion (dil=0) by a 3x3 SE
  function automatic img_t morph(img_t a, int w, int h, bit dil, logic [8:0] se);
    img_t o;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int acc;
        acc = dil ? 0 : 255;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (se[3*(dr+1) + (dc+1)] && in_img(r+dr, c+dc, w, h)) begin
              if (dil && int'(a[r+dr][c+dc]) > acc) acc = a[r+dr][c+dc];
              if (!dil && int'(a[r+dr][c+dc]) < acc) acc = a[r+dr][c+dc];
            end
        o[r][c] = 8'(acc);
      end
    return o;
  endfunction

  // one binary stage on bit 0; op codes as the B_* codes
  function automatic img_t bstage(img_t a, img_t m, int w, int h, int op, bit geo,
                                  logic [8:0] fg, logic [8:0] bg);
    img_t o;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        logic [8:0] b, vv;
        logic hit, res;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            vv[3*(dr+1)+(dc+1)] = in_img(r+dr, c+dc, w, h);
            b[3*(dr+1)+(dc+1)]  = in_img(r+dr, c+dc, w, h) ? a[r+dr][c+dc][0] : 1'b0;
          end
        hit = 1'b1;
        for (int k = 0; k < 9; k++) begin
          if (fg[k] && !b[k]) hit = 1'b0;
          if (bg[k] && b[k])  hit = 1'b0;
        end
        case (op)
          0: res = b[4];
          1: begin res = 1'b0; for (int k = 0; k < 9; k++) if (fg[k] && b[k]) res = 1'b1; end
          2: begin res = 1'b1; for (int k = 0; k < 9; k++) if (fg[k] && vv[k] && !b[k]) res = 1'b0; end
          3: res = hit;
          4: res = b[4] | hit;
          5: res = b[4] & ~hit;
          default: res = ~b[4];
        endcase
        if (geo) res = res & m[r][c][0];
        o[r][c] = {8{res}};
      end
    return o;
  endfunction

  // recursive distance step in raster order: min(in, min(left, up) + 1)
  function automatic img_t rdist(img_t a, int w, int h);
    img_t o;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int l, u, m;
        l = (c > 0) ? o[r][c-1] : 255;
        u = (r > 0) ? o[r-1][c] : 255;
        m = ((l < u) ? l : u) + 1;
        if (m > 255) m = 255;
        o[r][c] = 8'((int'(a[r][c]) < m) ? a[r][c] : m);
      end
    return o;
  endfunction

  // recursive reconstruction step in raster order
  function automatic img_t rrec(img_t a, img_t m, int w, int h);
    img_t o;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        logic l, u;
        l = (c > 0) ? o[r][c-1][0] : 1'b0;
        u = (r > 0) ? o[r-1][c][0] : 1'b0;
        o[r][c] = {8{m[r][c][0] & (a[r][c][0] | l | u)}};
      end
    return o;
  endfunction

  // reverse video order: rotate the image by 180 degrees
  function automatic img_t flip(img_t a, int w, int h);
    img_t o;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) o[r][c] = a[h-1-r][w-1-c];
    return o;
  endfunction

  function automatic logic [7:0] sadd(logic [7:0] a, logic [7:0] b);
    return (int'(a) + int'(b) > 255) ? 8'hFF : a + b;
  endfunction
  function automatic logic [7:0] ssub(logic [7:0] a, logic [7:0] b);
    return (a > b) ? a - b : 8'h00;
  endfunction

  // floor(log2(f+1)), the anamorphosis
  function automatic logic [7:0] flog2p1(int f);
    int v, n;
    v = f + 1; n = 0;
    while (v > 1) begin v = v >> 1; n++; end
    return 8'(n);
  endfunction
endpackage
