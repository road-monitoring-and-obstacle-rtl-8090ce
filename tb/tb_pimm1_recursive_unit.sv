// tb_pimm1_recursive_unit: raster frames through the recursive operator with
// a real delay line. Distance and reconstruction outputs are compared with
// raster-order software versions; latency P+2.
module tb_pimm1_recursive_unit;
  import msm_pkg::*;
  import tb_img_pkg::*;
  localparam int P = 12, W = 9, H = 7, LAT = P + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  r_op_e op;
  logic [7:0] p, q, dio, gpo;
  logic v_cur, v_left, v_up;
  logic [23:0] dl_to, dl_from;
  pimm1_recursive_unit dut (.*);
  line_delay #(.WIDTH(24), .DEPTH(P)) u_dl (.clk(clk), .rst_n(rst_n), .din(dl_to), .dout(dl_from));

  int checks = 0, failures = 0;
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  img_t ia, ib, io, ig, t;
  logic rv [4000];
  int rr [4000], rc [4000];

  task automatic run();
    int n;
    n = 0;
    for (int k = 0; k < 4000; k++) rv[k] = 0;
    for (int cyc = 0; cyc < H*P + LAT + P; cyc++) begin
      int r, c;
      @(negedge clk);
      if (cyc >= LAT && rv[cyc - LAT]) begin
        io[rr[cyc-LAT]][rc[cyc-LAT]] = dio;
        ig[rr[cyc-LAT]][rc[cyc-LAT]] = gpo;
        n++;
      end
      r = cyc / P; c = cyc % P;
      rv[cyc] = (r < H && c < W); rr[cyc] = r; rc[cyc] = c;
      p = rv[cyc] ? ia[r][c] : 8'h00;
      q = rv[cyc] ? ib[r][c] : 8'h00;
      v_cur = rv[cyc];
      v_left = (cyc >= 1) ? rv[cyc-1] : 1'b0;
      v_up = (cyc >= P) ? rv[cyc-P] : 1'b0;
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
    p = 0; q = 0; v_cur = 0; v_left = 0; v_up = 0; op = R_DIST;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
        ia[r][c] = (trial < 2) ? (($urandom_range(0, 5) == 0) ? 8'h00 : 8'($urandom_range(3, 255)))
                               : (($urandom_range(0, 9) == 0) ? 8'hFF : 8'h00);
        ib[r][c] = ($urandom_range(0, 3) != 0) ? 8'hFF : 8'h00;
      end
      op = (trial < 2) ? R_DIST : R_RECONS;
      run();
      cmp(io, (trial < 2) ? rdist(ia, W, H) : rrec(ia, ib, W, H), $sformatf("trial %0d", trial));
      cmp(ig, ib, "second flow realigned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
