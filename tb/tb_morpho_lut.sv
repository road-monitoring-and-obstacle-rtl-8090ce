// tb_morpho_lut: checks the identity content after reset, loads the log2
// anamorphosis floor(log2(f+1)), and checks the registered look-up and the
// host read-back.
module tb_morpho_lut;
  import tb_img_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [8:0] din, dout, wdata, rdata, addr;
  logic we;
  morpho_lut #(.AW(9), .DW(9)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = 0; we = 0; wdata = 0; addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i += 7) begin
      @(negedge clk); din = 9'(i);
      @(negedge clk); check(dout == 9'(i), "identity after reset");
    end
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; addr = 9'(i); wdata = {1'(i >> 8), flog2p1(i & 255)};
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); din = 9'(i); addr = 9'(i);
      #1 check(rdata == {1'(i >> 8), flog2p1(i & 255)}, "host read-back");
      @(negedge clk); check(dout == {1'(i >> 8), flog2p1(i & 255)}, $sformatf("log2 entry %0d", i));
    end
    // the anamorphosis keeps the order of grey levels and uses 9 levels
    check(flog2p1(255) == 8 && flog2p1(0) == 0 && flog2p1(1) == 1, "reference levels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
