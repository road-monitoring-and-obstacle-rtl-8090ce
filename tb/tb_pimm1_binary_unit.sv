// tb_pimm1_binary_unit: binary frames through the eight-stage pipeline with
// a real delay line; the tap-valid history comes from the testbench's record
// of the framing. Random stage programs (all operations, geodesic masking)
// are compared with stage-by-stage software processing; the result must
// come out 8*(P+2) clocks after the input. Then the stages are put in
// parallel: the result must be the OR of the stages that are not pass, each
// applied to the input, P+2 clocks after it.
module tb_pimm1_binary_unit;
  import msm_pkg::*;
  import tb_img_pkg::*;
  localparam int P = 12, W = 9, H = 7, NB = 8, N = NB*(P+2) + 2*P + 3;
  int LAT = NB*(P+2);
  logic par;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bstage_cfg_t [NB-1:0] cfg;
  logic [7:0] p, q, dio, gpo;
  logic [N-1:0] vh;
  logic [23:0] dl_to, dl_from;
  pimm1_binary_unit #(.P(P), .NB(NB), .N(N)) dut (.*);
  line_delay #(.WIDTH(24), .DEPTH(P)) u_dl (.clk(clk), .rst_n(rst_n), .din(dl_to), .dout(dl_from));

  int checks = 0, failures = 0;
  initial begin
    #5000000; failures++;
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
      for (int d = 0; d < N; d++) vh[d] = (cyc - d >= 0) ? rv[cyc - d] : 1'b0;
    end
    checks++;
    if (n != W*H) begin failures++; $display("FAIL count %0d", n); end
  endtask

  initial begin
    p = 0; q = 0; vh = '0; cfg = '0; par = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
        ia[r][c] = {8{1'($urandom)}}; ib[r][c] = ($urandom_range(0, 3) != 0) ? 8'hFF : 8'h00;
      end
      for (int k = 0; k < NB; k++) begin
        cfg[k].op  = b_op_e'((trial + k) % 7);
        cfg[k].geo = 1'($urandom);
        cfg[k].fg  = 9'($urandom) & 9'($urandom);
        cfg[k].bg  = 9'($urandom) & 9'($urandom) & ~cfg[k].fg;
      end
      run();
      t = ia;
      for (int k = 0; k < NB; k++) t = bstage(t, ib, W, H, int'(cfg[k].op), cfg[k].geo, cfg[k].fg, cfg[k].bg);
      begin
        int e, em;
        e = 0; em = 0;
        for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
          if (io[r][c] !== t[r][c]) e++;
          if (ig[r][c] !== ib[r][c]) em++;
        end
        checks += 2;
        if (e) begin failures++; $display("FAIL trial %0d: %0d errors", trial, e); end
        if (em) begin failures++; $display("FAIL mask trial %0d: %0d errors", trial, em); end
      end
    end
    par = 1; LAT = P + 2;
    for (int trial = 0; trial < 5; trial++) begin
      img_t u;
      int nact;
      for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) begin
        ia[r][c] = {8{1'($urandom)}}; ib[r][c] = ($urandom_range(0, 3) != 0) ? 8'hFF : 8'h00;
      end
      for (int k = 0; k < NB; k++) begin
        cfg[k].op  = (trial == 4 || $urandom_range(0, 2) == 0) ? B_PASS : b_op_e'($urandom_range(1, 6));
        cfg[k].geo = 1'($urandom);
        cfg[k].fg  = 9'($urandom) & 9'($urandom);
        cfg[k].bg  = 9'($urandom) & 9'($urandom) & ~cfg[k].fg;
      end
      if (trial == 0) begin        // union of the eight 45-degree rotations of an end-point template
        int ring [8] = '{0, 1, 2, 5, 8, 7, 6, 3};
        for (int k = 0; k < NB; k++) begin
          cfg[k].op = B_HMT; cfg[k].geo = 0;
          cfg[k].fg = (9'd1 << ring[k]) | 9'h010;
          cfg[k].bg = 9'h1FF & ~cfg[k].fg;
        end
      end
      run();
      nact = 0;
      for (int r = 0; r < MAXH; r++) for (int c = 0; c < MAXW; c++) u[r][c] = 8'h00;
      for (int k = 0; k < NB; k++) if (cfg[k].op != B_PASS) begin
        nact++;
        t = bstage(ia, ib, W, H, int'(cfg[k].op), cfg[k].geo, cfg[k].fg, cfg[k].bg);
        for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) u[r][c] |= t[r][c];
      end
      if (nact == 0) u = bstage(ia, ib, W, H, 0, cfg[0].geo, cfg[0].fg, cfg[0].bg);
      begin
        int e;
        e = 0;
        for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (io[r][c] !== u[r][c]) e++;
        checks++;
        if (e) begin failures++; $display("FAIL parallel trial %0d: %0d errors", trial, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
