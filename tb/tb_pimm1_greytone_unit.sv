// tb_pimm1_greytone_unit: raster frames through the two greytone processors
// with a real delay line. The testbench supplies the tap-valid bits from its
// own record of the input framing. Every combination mode is checked against
// dilations/erosions computed on the whole image, and the result must leave
// exactly P+2 clocks after the pixel entered.
module tb_pimm1_greytone_unit;
  import msm_pkg::*;
  import tb_img_pkg::*;
  localparam int P = 13, W = 9, H = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  g_op_e g0_op, g1_op;
  logic [8:0] g0_se, g1_se, vwin;
  g_comb_e comb;
  logic gpo_p1;
  logic [7:0] p, q, dio, gpo;
  logic [23:0] dl_to, dl_from;
  pimm1_greytone_unit dut (.*);
  line_delay #(.WIDTH(24), .DEPTH(P)) u_dl (.clk(clk), .rst_n(rst_n), .din(dl_to), .dout(dl_from));

  int checks = 0, failures = 0;
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  img_t ia, ib, io, ig, r0, r1, t;
  logic rv [4000];
  int rr [4000], rc [4000];

  task automatic run();
    int n;
    n = 0;
    for (int k = 0; k < 4000; k++) rv[k] = 0;
    for (int cyc = 0; cyc < H*P + 3*P; cyc++) begin
      int r, c;
      @(negedge clk);
      // outputs of the pixel entered P+2 clocks ago
      if (cyc >= P + 2 && rv[cyc - P - 2]) begin
        io[rr[cyc-P-2]][rc[cyc-P-2]] = dio;
        ig[rr[cyc-P-2]][rc[cyc-P-2]] = gpo;
        n++;
      end else if (cyc >= P + 2) begin
        checks++;
        if (dio !== 8'h00) begin failures++; $display("FAIL blanking output"); end
      end
      r = cyc / P; c = cyc % P;
      rv[cyc] = (r < H && c < W); rr[cyc] = r; rc[cyc] = c;
      p = rv[cyc] ? ia[r][c] : 8'h00;
      q = rv[cyc] ? ib[r][c] : 8'h00;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          vwin[3*i+j] = (cyc - i*P - j >= 0) ? rv[cyc - i*P - j] : 1'b0;
    end
    checks++;
    if (n != W*H) begin failures++; $display("FAIL count %0d", n); end
  endtask

  function automatic void cmp(img_t a, img_t b, string s);
    int e = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (a[r][c] !== b[r][c]) e++;
    checks++;
    if (e != 0) begin failures++; $display("FAIL %s: %0d errors", s, e); end
  endfunction

  initial begin
    p = 0; q = 0; vwin = 0; g0_op = G_DIL; g1_op = G_ERO; g0_se = 9'h1FF; g1_se = 9'h1FF;
    comb = GC_P0; gpo_p1 = 1;
    for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
      ia[r][c] = 8'($urandom); ib[r][c] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 7; m++) begin
      g0_se = 9'($urandom) | 9'h010; g1_se = 9'($urandom);
      g0_op = g_op_e'(m & 1); g1_op = g_op_e'(~m & 1);
      comb = g_comb_e'(m); gpo_p1 = m[0];
      run();
      r0 = morph(ia, W, H, g0_op == G_DIL, g0_se);
      r1 = morph(ia, W, H, g1_op == G_DIL, g1_se);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        case (m)
          0: t[r][c] = r0[r][c];
          1: t[r][c] = r1[r][c];
          2: t[r][c] = ssub(r0[r][c], r1[r][c]);
          3: t[r][c] = (r0[r][c] < ib[r][c]) ? r0[r][c] : ib[r][c];
          4: t[r][c] = (r0[r][c] > ib[r][c]) ? r0[r][c] : ib[r][c];
          5: t[r][c] = ssub(ia[r][c], r0[r][c]);
          default: t[r][c] = ssub(r0[r][c], ia[r][c]);
        endcase
      cmp(io, t, $sformatf("combination %0d", m));
      cmp(ig, m[0] ? r1 : ib, "gpo");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
