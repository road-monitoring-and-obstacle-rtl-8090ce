// tb_pimm1_prog_unit: writes random values into every register, checks the
// decoded configuration fields and the read-back, and checks that writes
// are ignored in the processing phase or without chip select.
module tb_pimm1_prog_unit;
  import msm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic proc_progn, csn, rwn;
  logic [5:0] add;
  logic [7:0] datai, datao;
  pimm_cfg_t cfg;
  pimm1_prog_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] shadow [64];
  task automatic wr(logic [5:0] a, logic [7:0] d, logic pp, logic cs);
    @(negedge clk); proc_progn = pp; csn = cs; rwn = 0; add = a; datai = d;
    @(negedge clk); csn = 1; rwn = 1; proc_progn = 0;
  endtask

  initial begin
    proc_progn = 0; csn = 1; rwn = 1; add = 0; datai = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.mode == MODE_GREY && cfg.pt_op == PT_A && cfg.g0_se == 9'h010 && cfg.thr_hi == 8'hFF,
          "reset configuration");
    for (int i = 0; i < 64; i++) begin
      shadow[i] = 8'($urandom);
      wr(6'(i), shadow[i], 0, 0);
    end
    wr(6'd5, 8'h00, 1, 0);   // processing phase: ignored
    wr(6'd5, 8'h00, 0, 1);   // not selected: ignored
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); csn = 0; rwn = 1; add = 6'(i);
      #1 check(datao == shadow[i], $sformatf("read-back %0d", i));
    end
    csn = 1;
    check(cfg.mode == pimm_mode_e'(shadow[0][1:0]), "mode");
    check(cfg.gpo_p1 == shadow[0][2], "gpo select");
    check(cfg.pt_op == pt_op_e'(shadow[1][3:0]), "point op");
    check(cfg.thr_lo == shadow[2] && cfg.thr_hi == shadow[3], "thresholds");
    check(cfg.g0_se == {shadow[4][7], shadow[5]} && cfg.g0_op == g_op_e'(shadow[4][0]), "g0");
    check(cfg.g1_se == {shadow[6][7], shadow[7]} && cfg.g1_op == g_op_e'(shadow[6][0]), "g1");
    check(cfg.g_comb == g_comb_e'(shadow[8][2:0]), "comb");
    check(cfg.r_op == r_op_e'(shadow[9][0]), "rec op");
    for (int k = 0; k < 8; k++) begin
      check(cfg.bst[k].op == b_op_e'(shadow[16+3*k][2:0]) && cfg.bst[k].geo == shadow[16+3*k][3], "stage op");
      check(cfg.bst[k].fg == {shadow[16+3*k][4], shadow[17+3*k]}, "stage fg");
      check(cfg.bst[k].bg == {shadow[16+3*k][5], shadow[18+3*k]}, "stage bg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
