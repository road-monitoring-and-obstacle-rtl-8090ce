// tb_scan_controller: scans windows in direct and reverse order. The read
// addresses must follow video order (or its reverse) with w active clocks
// in every P-clock line; the framing is looped back through a delay of LAT
// clocks, and the write addresses must repeat the read addresses in the same
// order. done must pulse once, right after the last write.
module tb_scan_controller;
  localparam int P = 20, IW = 32, IH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, reverse, hen, ven, res_hen, res_ven, wr_en, busy, done;
  logic [8:0] x0, y0, w, h;
  logic [8:0] rd_pix, wr_pix;
  scan_controller #(.P(P), .IMG_W(IW), .IMG_H(IH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic dh [200], dv [200];
  always_ff @(posedge clk) begin
    for (int i = 199; i > 0; i--) begin dh[i] <= dh[i-1]; dv[i] <= dv[i-1]; end
    dh[0] <= hen; dv[0] <= ven;
  end

  initial begin
    int lat;
    start = 0; reverse = 0; x0 = 0; y0 = 0; w = 1; h = 1;
    for (int i = 0; i < 200; i++) begin dh[i] = 0; dv[i] = 0; end
    res_hen = 0; res_ven = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      int exp_pix [$];
      int nrd, nwr, ndone, cyc, lines, act_in_line;
      bit prev_ven;
      exp_pix.delete();
      x0 = 9'($urandom_range(0, 10)); y0 = 9'($urandom_range(0, 6));
      w = 9'($urandom_range(1, IW - 10)); h = 9'($urandom_range(1, IH - 6));
      if (w > P - 1) w = P - 1;
      reverse = trial[0]; lat = $urandom_range(1, 150);
      for (int r = 0; r < h; r++) for (int c = 0; c < w; c++)
        exp_pix.push_back(reverse ? (y0 + h - 1 - r) * IW + x0 + w - 1 - c : (y0 + r) * IW + x0 + c);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      check(busy, "busy after start");
      nrd = 0; nwr = 0; ndone = 0; cyc = 0; lines = 0; act_in_line = 0;
      prev_ven = 0;
      while (busy && cyc < 10000) begin
        res_hen = dh[lat-1]; res_ven = dv[lat-1];
        #1;
        if (hen && ven) begin
          check(int'(rd_pix) == exp_pix[nrd], $sformatf("read address %0d: %0d exp %0d (x0=%0d y0=%0d w=%0d h=%0d)", nrd, rd_pix, exp_pix[nrd], x0, y0, w, h));
          check((cyc % P) < w, "active pixel position in the line");
          nrd++;
        end
        if (wr_en) begin
          check(int'(wr_pix) == exp_pix[nwr], $sformatf("write address %0d", nwr));
          nwr++;
        end
        @(negedge clk); cyc++;
        if (done) ndone++;
      end
      check(nrd == w*h && nwr == w*h, $sformatf("pixel counts %0d %0d", nrd, nwr));
      check(ndone == 1, "one done pulse");
      check(cyc >= h*P, "scan time is h lines of P clocks");
      repeat (210) @(negedge clk);   // let the loop-back delay empty
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
