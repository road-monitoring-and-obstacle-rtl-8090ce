// pimm1_point_unit: point-to-point processor at the input of PIMM1.
//
// Combines the two input images A and B (and the auxiliary input C of the
// board's DIC pin) pixel by pixel: saturated addition and subtraction,
// minimum, maximum, a two-sided threshold and bitwise Boolean operators, as
// listed for the point processor. The exact operation set, the saturation
// and the threshold output of 0/255 are this design's choices.
//
// Timing: one register. p and q (the second flow, B passed on unchanged)
// appear one clock after a, b, c, together with v (pixel valid).
module pimm1_point_unit
  import msm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pt_op_e     op,
  input  logic [7:0] thr_lo,
  input  logic [7:0] thr_hi,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] c,
  input  logic       vin,
  output logic [7:0] p,
  output logic [7:0] q,
  output logic       v
);
  logic [7:0] res;

  always_comb begin
    unique case (op)
      PT_A:    res = a;
      PT_ADD:  res = sat_add(a, b);
      PT_SUB:  res = sat_sub(a, b);
      PT_MIN:  res = (a < b) ? a : b;
      PT_MAX:  res = (a > b) ? a : b;
      PT_THR:  res = (a >= thr_lo && a <= thr_hi) ? 8'hFF : 8'h00;
      PT_AND:  res = a & b;
      PT_OR:   res = a | b;
      PT_XOR:  res = a ^ b;
      PT_NOT:  res = ~a;
      PT_SELC: res = (c != 8'h00) ? a : b;
      PT_B:    res = b;
      default: res = a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p <= '0; q <= '0; v <= 1'b0;
    end else begin
      p <= res; q <= b; v <= vin;
    end
  end
endmodule
