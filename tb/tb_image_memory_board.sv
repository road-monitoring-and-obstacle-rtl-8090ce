// tb_image_memory_board: the memory board with two software pipelines
// looped back on its morphobus ports (fixed latencies, simple pixel
// functions). Checks the host interface memory -> processor path, the
// acquisition double buffer and its interrupt, results written into the
// other processor's memory, into the visualization and into the host
// interface memory, window (ROI) scans in reverse order, two processors
// scanning at the same time, the processing interrupts and their clearing.
module tb_image_memory_board;
  import msm_pkg::*;
  localparam int P = 20, NF = 4, IW = 16, IH = 8, PA = 7;
  localparam int LAT0 = 37, LAT1 = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we, hm_we, acq_we, acq_frame_done, irq_acq;
  logic [7:0] reg_addr, acq_data;
  logic [15:0] reg_wdata, reg_rdata;
  logic [PA-1:0] hm_addr, acq_addr, vis_addr;
  logic [8:0] hm_wdata, hm_rdata, vis_data;
  logic [8:0] mb_main [NPROC];
  logic [7:0] mb_second [NPROC];
  logic mb_hen [NPROC], mb_ven [NPROC];
  logic [8:0] mb_result [NPROC];
  logic mb_res_hen [NPROC], mb_res_ven [NPROC];
  logic [NPROC-1:0] irq_proc;

  image_memory_board #(.P(P), .NFRAMES(NF), .IMG_W(IW), .IMG_H(IH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // software pipelines: p0 result = main + second, p1 result = ~main
  function automatic logic [8:0] f0(logic [8:0] m, logic [7:0] s); return m + 9'(s); endfunction
  function automatic logic [8:0] f1(logic [8:0] m, logic [7:0] s); return ~m; endfunction
  logic [8:0] d0r [LAT0]; logic d0h [LAT0], d0v [LAT0];
  logic [8:0] d1r [LAT1]; logic d1h [LAT1], d1v [LAT1];
  always_ff @(posedge clk) begin
    d0r[0] <= f0(mb_main[0], mb_second[0]); d0h[0] <= mb_hen[0]; d0v[0] <= mb_ven[0];
    for (int i = 1; i < LAT0; i++) begin d0r[i] <= d0r[i-1]; d0h[i] <= d0h[i-1]; d0v[i] <= d0v[i-1]; end
    d1r[0] <= f1(mb_main[1], mb_second[1]); d1h[0] <= mb_hen[1]; d1v[0] <= mb_ven[1];
    for (int i = 1; i < LAT1; i++) begin d1r[i] <= d1r[i-1]; d1h[i] <= d1h[i-1]; d1v[i] <= d1v[i-1]; end
  end
  assign mb_result[0] = d0r[LAT0-1]; assign mb_res_hen[0] = d0h[LAT0-1]; assign mb_res_ven[0] = d0v[LAT0-1];
  assign mb_result[1] = d1r[LAT1-1]; assign mb_res_hen[1] = d1h[LAT1-1]; assign mb_res_ven[1] = d1v[LAT1-1];

  // flows seen on the morphobus, per processor
  logic [8:0] seen_main [NPROC][$];
  always @(negedge clk) for (int p = 0; p < NPROC; p++) if (mb_hen[p] && mb_ven[p]) seen_main[p].push_back(mb_main[p]);

  task automatic rw(logic [7:0] a, logic [15:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic scan_cfg(int p, int sm, int ss, int dm, int df, int x0, int y0, int w, int h, int rev);
    logic [7:0] b;
    b = 8'(16*(p+1));
    rw(b + 0, 16'(sm)); rw(b + 1, 16'(ss)); rw(b + 2, 16'(dm)); rw(b + 3, 16'(df));
    rw(b + 4, 16'(x0)); rw(b + 5, 16'(y0)); rw(b + 6, 16'(w)); rw(b + 7, 16'(h)); rw(b + 8, 16'(rev));
  endtask
  task automatic wait_irq(int p);
    int n;
    n = 0;
    while (!irq_proc[p] && n < 100000) begin @(negedge clk); n++; end
    check(irq_proc[p], $sformatf("processing interrupt %0d", p));
  endtask
  // expected scan order of a window
  function automatic int pix(int k, int x0, int y0, int w, int h, int rev);
    int r, c;
    r = k / w; c = k % w;
    if (rev) begin r = h - 1 - r; c = w - 1 - c; end
    return (y0 + r) * IW + x0 + c;
  endfunction

  logic [8:0] himg [IW*IH], aimg [IW*IH], m0f1 [IW*IH];
  initial begin
    reg_we = 0; hm_we = 0; acq_we = 0; acq_frame_done = 0; reg_addr = 0; reg_wdata = 0;
    hm_addr = 0; hm_wdata = 0; acq_addr = 0; acq_data = 0; vis_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. host image -> processor 0 -> memory 0 frame 1 and visualization
    for (int i = 0; i < IW*IH; i++) begin
      @(negedge clk); hm_we = 1; hm_addr = PA'(i); hm_wdata = 9'($urandom); himg[i] = hm_wdata;
    end
    @(negedge clk); hm_we = 0;
    rw(8'h01, 16'h0002);                       // host bank to the board side
    scan_cfg(0, SRC_HOST, SRC_HOST, (1 << DST_MEM0) | (1 << DST_VIS), 1, 0, 0, IW, IH, 0);
    seen_main[0].delete();
    rw(8'h19, 0);
    @(negedge clk); reg_addr = 8'h00; #1 check(reg_rdata[3] == 1'b1, "busy flag");
    wait_irq(0);
    for (int i = 0; i < IW*IH; i++) m0f1[i] = f0(himg[i], himg[i][7:0]);
    check(seen_main[0].size() == IW*IH, "main flow length");
    for (int i = 0; i < IW*IH && i < seen_main[0].size(); i++)
      check(seen_main[0][i] == himg[i], "main flow from host memory");
    rw(8'h00, 16'h0001);
    check(irq_proc[0] == 1'b0, "interrupt cleared");
    rw(8'h01, 16'h0001);                       // show the new result
    for (int i = 0; i < IW*IH; i++) begin
      vis_addr = PA'(i); #1 check(vis_data == m0f1[i], "visualization content");
    end

    // 2. camera frame -> processor 1 (reverse ROI) -> memory 0 frame 2 + host,
    //    at the same time processor 0 scans memory 0 frame 1 -> memory 1 frame 0
    for (int i = 0; i < IW*IH; i++) begin
      @(negedge clk); acq_we = 1; acq_addr = PA'(i); acq_data = 8'($urandom); aimg[i] = {1'b0, acq_data};
    end
    @(negedge clk); acq_we = 0; acq_frame_done = 1;
    @(negedge clk); acq_frame_done = 0;
    check(irq_acq == 1'b1, "acquisition interrupt");
    scan_cfg(1, SRC_ACQ, SRC_ACQ, (1 << DST_MEM0) | (1 << DST_HOST), 2, 3, 2, 9, 5, 1);
    scan_cfg(0, 1, 1, (1 << DST_MEM1), 0, 0, 0, IW, IH, 0);
    seen_main[0].delete(); seen_main[1].delete();
    @(negedge clk); reg_we = 1; reg_addr = 8'h29; reg_wdata = 0;
    @(negedge clk); reg_addr = 8'h19;
    @(negedge clk); reg_we = 0;
    wait_irq(1); wait_irq(0);
    for (int i = 0; i < IW*IH; i++) check(seen_main[0][i] == m0f1[i], "memory 0 frame 1 content");
    for (int k = 0; k < 45; k++) check(seen_main[1][k] == aimg[pix(k, 3, 2, 9, 5, 1)], "reverse ROI scan of the camera frame");
    rw(8'h00, 16'h0007);
    // host interface memory: ROI holds ~camera, the rest the original image
    rw(8'h01, 16'h0002);
    for (int i = 0; i < IW*IH; i++) begin
      int x, y;
      x = i % IW; y = i / IW;
      hm_addr = PA'(i); #1;
      if (x >= 3 && x < 12 && y >= 2 && y < 7) check(hm_rdata == ~aimg[i], "ROI result in host memory");
      else check(hm_rdata == himg[i], "host memory outside the ROI");
    end

    // 3. read back memory 0 frame 2 (ROI only) and memory 1 frame 0
    scan_cfg(0, 2, 2, 0, 0, 3, 2, 9, 5, 0);
    scan_cfg(1, 0, 0, 0, 0, 0, 0, IW, IH, 0);
    seen_main[0].delete(); seen_main[1].delete();
    rw(8'h19, 0); rw(8'h29, 0);
    wait_irq(0); wait_irq(1);
    for (int k = 0; k < 45; k++) check(seen_main[0][k] == ~aimg[pix(k, 3, 2, 9, 5, 0)], "result of processor 1 in memory 0");
    for (int i = 0; i < IW*IH; i++) check(seen_main[1][i] == f0(m0f1[i], m0f1[i][7:0]), "result of processor 0 in memory 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
