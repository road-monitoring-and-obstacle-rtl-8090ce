// line_delay: the external delay line that sits beside each PIMM1 chip.
//
// It delays a WIDTH-bit word by exactly DEPTH clocks, where DEPTH is the
// number of clocks in one video line (active pixels plus horizontal
// blanking). The chip sends out the words it needs one line later and gets
// them back on dout. The 24-bit width is the one printed in the board
// diagram; a circular buffer with one write and one read per clock is this
// design's choice of implementation.
//
// Timing: dout(t) = din(t - DEPTH). The read is combinational from the
// buffer, so the value is available in the same clock the chip uses it.
module line_delay #(
  parameter int WIDTH = 24,
  parameter int DEPTH = 264
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) mem[ptr] <= din;
endmodule
