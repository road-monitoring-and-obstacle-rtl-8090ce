// tb_pimm1_sync_unit: random video signals; checks the valid history taps
// and the delayed HEN/VEN in greytone mode and in binary mode (stages in
// pipeline, then in parallel), and the flush.
module tb_pimm1_sync_unit;
  import msm_pkg::*;
  localparam int P = 6, NB = 3, N = NB*(P+2) + 2*P + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pimm_mode_e mode;
  logic par, flush, heni, veni, heno, veno;
  logic [N-1:0] vh;
  pimm1_sync_unit #(.P(P), .NB(NB), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  logic hh [2000], vv [2000];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mode = MODE_GREY; par = 0; flush = 0; heni = 0; veni = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t == 500) mode = MODE_BIN;
      if (t == 750) par = 1;
      #1;
      if (t >= N + 2) begin
        int lat;
        lat = (mode == MODE_BIN && !par) ? NB*(P+2) + 1 : P + 3;
        checks++;
        if (heno !== hh[t - lat] || veno !== vv[t - lat]) begin
          failures++; $display("FAIL heno t=%0d", t);
        end
        for (int d = 0; d < N; d++) begin
          checks++;
          if (vh[d] !== (hh[t-1-d] & vv[t-1-d])) begin
            failures++; $display("FAIL vh[%0d] t=%0d", d, t);
          end
        end
      end
      heni = 1'($urandom); veni = ($urandom_range(0, 7) != 0);
      hh[t] = heni; vv[t] = veni;
    end
    flush = 1;
    @(negedge clk); flush = 0; heni = 0; veni = 0;
    checks++;
    if (vh !== '0) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
