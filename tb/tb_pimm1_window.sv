// tb_pimm1_window: random samples through the window former and a delay line
// of P clocks; every tap (i,j) must equal the sample of i*P + j clocks ago.
module tb_pimm1_window;
  localparam int P = 9, W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] x, dl_to0, dl_to1, dl_from0, dl_from1;
  logic [W-1:0] win [3][3];
  pimm1_window #(.W(W)) dut (.*);
  line_delay #(.WIDTH(2*W), .DEPTH(P)) u_dl (.clk(clk), .rst_n(rst_n),
    .din({dl_to1, dl_to0}), .dout({dl_from1, dl_from0}));

  int checks = 0, failures = 0;
  logic [W-1:0] hist [1000];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      x = W'($urandom); hist[t] = x;
      #1;
      if (t >= 2*P + 2)
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (win[i][j] !== hist[t - i*P - j]) begin
              failures++; $display("FAIL t=%0d tap %0d,%0d", t, i, j);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
