// frame_memory: processor image memory of the memory board.
//
// NFRAMES image buffers of IMG_W x IMG_H 9-bit pixels (16 x 256 x 256 in
// the document). A buffer can hold a greytone image or binary images.
// Two read ports deliver the main and the second flow of the pipeline
// processor in the same scan; one write port takes the returning result
// flow, so reading and writing back happen at pixel rate at the same time.
// Address = {frame, y*IMG_W + x}.
//
// Timing: reads are registered (data one clock after the address); a write
// is done at the clock edge. The port count is this design's reading of
// "main flow + second flow + result flow".
module frame_memory #(
  parameter int NFRAMES = 16,
  parameter int IMG_W   = 256,
  parameter int IMG_H   = 256,
  parameter int DW      = 9,
  localparam int AW     = $clog2(NFRAMES) + $clog2(IMG_W*IMG_H)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd0_addr,
  output logic [DW-1:0] rd0_data,
  input  logic [AW-1:0] rd1_addr,
  output logic [DW-1:0] rd1_data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    rd0_data <= mem[rd0_addr];
    rd1_data <= mem[rd1_addr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
