// tb_frame_memory: writes random pixels into random frames while reading
// two other addresses each clock; both registered read ports must return
// what was last written there.
module tb_frame_memory;
  localparam int NF = 4, IW = 16, IH = 8, AW = 2 + 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] rd0_addr, rd1_addr, waddr;
  logic [8:0] rd0_data, rd1_data, wdata;
  logic we;
  frame_memory #(.NFRAMES(NF), .IMG_W(IW), .IMG_H(IH), .DW(9)) dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] shadow [2**AW];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [AW-1:0] a0, a1;
    we = 0; waddr = 0; wdata = 0; rd0_addr = 0; rd1_addr = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = 9'($urandom); shadow[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks += 2;
        if (rd0_data !== shadow[a0]) begin failures++; $display("FAIL rd0"); end
        if (rd1_data !== shadow[a1]) begin failures++; $display("FAIL rd1"); end
      end
      a0 = AW'($urandom); a1 = AW'($urandom);
      rd0_addr = a0; rd1_addr = a1;
      we = 1'($urandom); waddr = AW'($urandom); wdata = 9'($urandom);
      if (waddr == a0 || waddr == a1) we = 0;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
