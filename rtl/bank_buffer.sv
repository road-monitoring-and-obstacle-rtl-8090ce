// bank_buffer: two-bank image buffer of the memory board, used for the
// acquisition frame memory, the host interface memory and the
// visualization buffers.
//
// While the outside side (Maxbus camera or display, or the host) works on
// one bank, the board side (pipeline processors) works on the other, so a
// camera frame can be written while the previous one is processed, or a
// result written while the previous one is displayed. A pulse on swap
// exchanges the banks; sel tells which bank the outside side uses.
//  outside side: one write and one read port (combinational read);
//  board side:   one write port and two registered read ports, one for each
//                pipeline processor.
// The two-bank organisation is the document's; the port set is this
// design's choice.
module bank_buffer #(
  parameter int PIX = 65536,
  parameter int DW  = 9,
  localparam int AW = $clog2(PIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  output logic          sel,
  // outside side, bank sel
  input  logic          ext_we,
  input  logic [AW-1:0] ext_waddr,
  input  logic [DW-1:0] ext_wdata,
  input  logic [AW-1:0] ext_raddr,
  output logic [DW-1:0] ext_rdata,
  // board side, bank !sel
  input  logic          brd_we,
  input  logic [AW-1:0] brd_waddr,
  input  logic [DW-1:0] brd_wdata,
  input  logic [AW-1:0] brd_raddr0,
  output logic [DW-1:0] brd_rdata0,
  input  logic [AW-1:0] brd_raddr1,
  output logic [DW-1:0] brd_rdata1
);
  logic [DW-1:0] mem [2][PIX];

  always_ff @(posedge clk) begin
    if (!rst_n)    sel <= 1'b0;
    else if (swap) sel <= ~sel;
  end

  always_ff @(posedge clk) begin
    if (ext_we) mem[sel][ext_waddr] <= ext_wdata;
    if (brd_we) mem[~sel][brd_waddr] <= brd_wdata;
    brd_rdata0 <= mem[~sel][brd_raddr0];
    brd_rdata1 <= mem[~sel][brd_raddr1];
  end

  assign ext_rdata = mem[sel][ext_raddr];
endmodule
