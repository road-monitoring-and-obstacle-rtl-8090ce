// tb_histogrammer: random valid/invalid pixels; every bin must equal the
// count kept by the testbench; a clear empties all bins.
module tb_histogrammer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] d, raddr;
  logic v, clr;
  logic [16:0] rdata;
  histogrammer #(.CW(17)) dut (.*);

  int checks = 0, failures = 0;
  int cnt [256];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    d = 0; v = 0; clr = 0; raddr = 0;
    foreach (cnt[i]) cnt[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      d = 8'($urandom_range(0, 40)) * 8'($urandom_range(0, 6));
      v = ($urandom_range(0, 3) != 0);
      if (v) cnt[d]++;
    end
    @(negedge clk); v = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (int'(rdata) != cnt[i]) begin failures++; $display("FAIL bin %0d %0d/%0d", i, rdata, cnt[i]); end
    end
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    for (int i = 0; i < 256; i += 5) begin
      raddr = 8'(i); #1;
      checks++;
      if (rdata != 0) begin failures++; $display("FAIL clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
