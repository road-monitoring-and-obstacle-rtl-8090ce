// pimm1_sync_unit: synchronization unit of PIMM1.
//
// Keeps a shift register of the incoming video signals HEN and VEN, one
// entry per clock. From it the chip takes
//  * vh[d]: "pixel valid" of the point-unit output d clocks ago. The
//    neighbourhood processors use it to know which taps of a 3x3 window lie
//    inside the image (tap delays i*P+j), so no border counters are needed;
//  * heno/veno: the video signals delayed by the latency of the selected
//    processing mode, so that they stay aligned with the output pixels.
// The chip latency, in clocks from DIA to DIO, is 1 + SL in greytone and
// recursive mode and in binary mode with the stages in parallel, and
// 1 + NB*SL in binary mode with the stages in pipeline, where SL = P + 2 is the
// latency of one 3x3 stage (one line and one pixel to reach the window
// centre, one output register). While flush is high (programming phase)
// the history is cleared, so that a mode change cannot bring out the
// framing of an earlier frame at the new latency. The block is named in the chip diagram;
// what it does here is this design's reading of its name.
module pimm1_sync_unit
  import msm_pkg::*;
#(
  parameter int P  = 264,            // clocks per video line
  parameter int NB = 8,              // binary stages
  parameter int N  = NB*(P+2) + 2*P + 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pimm_mode_e   mode,
  input  logic         par,       // binary stages in parallel
  input  logic         flush,     // programming phase: no frame in flight
  input  logic         heni,
  input  logic         veni,
  output logic [N-1:0] vh,
  output logic         heno,
  output logic         veno
);
  localparam int SL = P + 2;

  logic [N-1:0] sh_h, sh_v;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      sh_h <= '0;
      sh_v <= '0;
    end else begin
      sh_h <= {sh_h[N-2:0], heni};
      sh_v <= {sh_v[N-2:0], veni};
    end
  end

  assign vh = sh_h & sh_v;

  always_comb begin
    if (mode == MODE_BIN && !par) begin
      heno = sh_h[NB*SL];
      veno = sh_v[NB*SL];
    end else begin
      heno = sh_h[SL];
      veno = sh_v[SL];
    end
  end
endmodule
