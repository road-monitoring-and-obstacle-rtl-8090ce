// tb_bank_buffer: the outside side and the board side work on different
// banks; after a swap each side sees what the other side wrote.
module tb_bank_buffer;
  localparam int PIX = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap, sel, ext_we, brd_we;
  logic [5:0] ext_waddr, ext_raddr, brd_waddr, brd_raddr0, brd_raddr1;
  logic [8:0] ext_wdata, ext_rdata, brd_wdata, brd_rdata0, brd_rdata1;
  bank_buffer #(.PIX(PIX), .DW(9)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [8:0] a [PIX], b [PIX];
  initial begin
    swap = 0; ext_we = 0; brd_we = 0; ext_waddr = 0; ext_raddr = 0; brd_waddr = 0;
    brd_raddr0 = 0; brd_raddr1 = 0; ext_wdata = 0; brd_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // both sides write their own bank at the same time
      for (int i = 0; i < PIX; i++) begin
        @(negedge clk);
        ext_we = 1; ext_waddr = 6'(i); ext_wdata = 9'($urandom); a[i] = ext_wdata;
        brd_we = 1; brd_waddr = 6'(i); brd_wdata = 9'($urandom); b[i] = brd_wdata;
      end
      @(negedge clk); ext_we = 0; brd_we = 0;
      // each side reads back its own bank
      for (int i = 0; i < PIX; i++) begin
        @(negedge clk); ext_raddr = 6'(i); brd_raddr0 = 6'(i); brd_raddr1 = 6'(PIX - 1 - i);
        #1 check(ext_rdata == a[i], "outside side own bank");
        @(negedge clk);
        check(brd_rdata0 == b[i] && brd_rdata1 == b[PIX-1-i], "board side own bank");
      end
      // swap: the board now reads what the outside side wrote
      @(negedge clk); swap = 1;
      @(negedge clk); swap = 0;
      check(sel == 1'(round + 1), "bank select toggles");
      for (int i = 0; i < PIX; i++) begin
        @(negedge clk); ext_raddr = 6'(i); brd_raddr0 = 6'(i);
        #1 check(ext_rdata == b[i], "outside side sees board data");
        @(negedge clk); check(brd_rdata0 == a[i], "board side sees outside data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
