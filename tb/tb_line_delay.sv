// tb_line_delay: checks that the delay line returns every word exactly DEPTH
// clocks after it was written, for random data.
module tb_line_delay;
  localparam int WIDTH = 24, DEPTH = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [WIDTH-1:0] din, dout;
  line_delay #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [1000];
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      // dout now shows the word written DEPTH clocks before the next edge
      if (t >= DEPTH) begin
        checks++;
        if (dout !== hist[t - DEPTH]) begin
          failures++;
          $display("FAIL t=%0d got %h exp %h", t, dout, hist[t - DEPTH]);
        end
      end
      din = WIDTH'($urandom);
      hist[t] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
