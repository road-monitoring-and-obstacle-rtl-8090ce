// scan_controller: drives one pipeline processor from the memory board.
//
// On start it scans the window (x0, y0, w, h) of the source images in
// video order, or in reverse video order when reverse is set (needed by the
// recursive operators), one pixel per clock. Each line lasts P clocks: w
// active pixels (HEN high) followed by blanking, VEN stays high for the h
// lines. After the last line the controller keeps VEN low and waits for the
// result flow: every result pixel (res_hen & res_ven) is written back at the
// address of the pixel it came from, counted in the same order, so the
// pipeline latency does not have to be known. When the w*h-th result has
// been written, done pulses (the memory board raises the processor's
// interrupt) and the controller is idle again.
//
// Outputs rd_pix/hen/ven are the raw scan; the memory board adds its read
// and crossbar registers. Requires 1 <= w < P and 1 <= h, x0+w <= IMG_W,
// y0+h <= IMG_H. Pixel address = y*IMG_W + x. The document gives the
// scanning directions and the interrupt; counters and handshake are this
// design's own.
module scan_controller #(
  parameter int P     = 264,
  parameter int IMG_W = 256,
  parameter int IMG_H = 256,
  localparam int PA   = $clog2(IMG_W*IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [8:0]    x0, y0, w, h,
  input  logic          reverse,
  // read side
  output logic [PA-1:0] rd_pix,
  output logic          hen,
  output logic          ven,
  // write side
  input  logic          res_hen,
  input  logic          res_ven,
  output logic          wr_en,
  output logic [PA-1:0] wr_pix,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN} state_e;
  state_e state;

  logic [$clog2(P)-1:0] col;
  logic [8:0] row, wcol, wrow;

  function automatic logic [PA-1:0] pix_addr(logic [8:0] c, logic [8:0] r,
                                             logic [8:0] ox, logic [8:0] oy,
                                             logic [8:0] ww, logic [8:0] hh, logic rev);
    logic [8:0] x, y;
    x = ox + (rev ? ww - 9'd1 - c : c);
    y = oy + (rev ? hh - 9'd1 - r : r);
    return PA'(y) * PA'(IMG_W) + PA'(x);
  endfunction

  wire col_act = ({1'b0, 9'(col)} < {1'b0, w});
  wire res_v   = res_hen && res_ven && state != S_IDLE;
  wire last_wr = res_v && wcol == w - 9'd1 && wrow == h - 9'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      col <= '0; row <= '0; wcol <= '0; wrow <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN;
          col <= '0; row <= '0; wcol <= '0; wrow <= '0;
        end
        S_SCAN: begin
          if (col == ($clog2(P))'(P - 1)) begin
            col <= '0;
            row <= row + 9'd1;
            if (row == h - 9'd1) state <= S_DRAIN;
          end else begin
            col <= col + 1'b1;
          end
        end
        default: ;
      endcase
      if (res_v) begin
        if (wcol == w - 9'd1) begin
          wcol <= '0;
          wrow <= wrow + 9'd1;
        end else begin
          wcol <= wcol + 9'd1;
        end
      end
      if (last_wr) begin
        state <= S_IDLE;
        done  <= 1'b1;
      end
    end
  end

  assign ven    = (state == S_SCAN);
  assign hen    = (state == S_SCAN) && col_act;
  assign rd_pix = pix_addr(9'(col), row, x0, y0, w, h, reverse);
  assign wr_en  = res_v;
  assign wr_pix = pix_addr(wcol, wrow, x0, y0, w, h, reverse);
  assign busy   = (state != S_IDLE);
endmodule
