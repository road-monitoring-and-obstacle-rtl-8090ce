// tb_resync_delay: random data through the programmable delay line at
// several depths, including the maximum; dout must equal din of exactly
// depth clocks earlier.
module tb_resync_delay;
  localparam int W = 8, MAXD = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] depth;
  logic [W-1:0] din, dout;
  resync_delay #(.W(W), .MAXD(MAXD)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] hist [5000];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t;
    int depths [5] = '{1, 7, 17, 33, 50};
    din = 0; depth = 16'd1; t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (depths[k]) begin
      depth = 16'(depths[k]);
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        #1;
        if (n >= depths[k]) begin
          checks++;
          if (dout !== hist[t - depths[k]]) begin
            failures++; $display("FAIL depth %0d t=%0d", depths[k], t);
          end
        end
        din = W'($urandom); hist[t] = din; t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
