// tb_pimm1_point_unit: random operands through every point operation,
// compared with an independent computation one clock later.
module tb_pimm1_point_unit;
  import msm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pt_op_e op;
  logic [7:0] thr_lo, thr_hi, a, b, c, p, q;
  logic vin, v;
  pimm1_point_unit dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [7:0] model(int o, int x, int y, int z, int lo, int hi);
    case (o)
      0: return 8'(x);
      1: return (x + y > 255) ? 8'hFF : 8'(x + y);
      2: return (x > y) ? 8'(x - y) : 8'h00;
      3: return 8'((x < y) ? x : y);
      4: return 8'((x > y) ? x : y);
      5: return (x >= lo && x <= hi) ? 8'hFF : 8'h00;
      6: return 8'(x & y);
      7: return 8'(x | y);
      8: return 8'(x ^ y);
      9: return 8'(255 - x);
      10: return 8'((z != 0) ? x : y);
      default: return 8'(y);
    endcase
  endfunction

  initial begin
    logic [7:0] e;
    op = PT_A; thr_lo = 0; thr_hi = 0; a = 0; b = 0; c = 0; vin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int o;
      o = t % 12;
      @(negedge clk);
      op = pt_op_e'(o);
      a = 8'($urandom); b = 8'($urandom); c = ($urandom_range(0, 1) == 0) ? 8'h00 : 8'($urandom);
      thr_lo = 8'($urandom_range(0, 128)); thr_hi = 8'($urandom_range(100, 255));
      vin = 1'($urandom);
      if (t % 50 == 0) begin a = thr_lo; end
      e = model(o, a, b, c, thr_lo, thr_hi);
      @(negedge clk);
      checks++;
      if (p !== e || q !== b || v !== vin) begin
        failures++;
        $display("FAIL op=%0d a=%0d b=%0d got %0d exp %0d", o, a, b, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
