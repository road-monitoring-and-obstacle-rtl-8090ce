// pimm1_recursive_unit: recursive operator of PIMM1 (distance function and
// particle reconstruction).
//
// A recursive transform uses, for the current pixel, results already
// computed in the same scan. Here the causal neighbours are the left pixel
// (kept in a register) and the pixel above (the result of one line earlier,
// returned by the external delay line on bits [7:0]):
//   distance:        r = min(in, min(r_left, r_up) + 1)
//                    (outside taps count as 255). A first scan of a 0/255
//                    image followed by a reverse-order scan of the result
//                    gives the city-block distance to the background.
//   reconstruction:  r = mask & (marker | r_left | r_up), 0/255 images;
//                    alternating direct and reverse scans until nothing
//                    changes give the reconstruction of the mask particles
//                    hit by the marker (4-connectivity).
// The input is the point-unit output p, the mask is bit 0 of the second flow
// q. The document only says that distance function and reconstruction are
// implemented recursively; the neighbour set and formulas are this design's.
//
// Delay-line use: [7:0] result for the line above, [15:8] result realigned,
// [23:16] second flow realigned. Timing: latency P+2, like the greytone unit.
module pimm1_recursive_unit
  import msm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  r_op_e       op,
  input  logic [7:0]  p,
  input  logic [7:0]  q,
  input  logic        v_cur,    // p(t) is an image pixel
  input  logic        v_left,   // p(t-1) is an image pixel
  input  logic        v_up,     // p(t-P) is an image pixel
  output logic [23:0] dl_to,
  input  logic [23:0] dl_from,
  output logic [7:0]  dio,
  output logic [7:0]  gpo
);
  logic [7:0] rprev, res, l, u, m, r1, qd;

  always_comb begin
    if (op == R_DIST) begin
      l = v_left ? rprev : 8'hFF;
      u = v_up ? dl_from[7:0] : 8'hFF;
      m = (l < u) ? l : u;
      m = sat_add(m, 8'd1);
      res = (p < m) ? p : m;
    end else begin
      l = {8{v_left & rprev[0]}};
      u = {8{v_up & dl_from[0]}};
      m = '0;
      res = {8{q[0] & (p[0] | l[0] | u[0])}};
    end
    if (!v_cur) res = 8'h00;
  end

  assign dl_to = {q, res, res};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rprev <= '0; r1 <= '0; qd <= '0; dio <= '0; gpo <= '0;
    end else begin
      rprev <= res;
      r1    <= dl_from[15:8];
      qd    <= dl_from[23:16];
      dio   <= r1;
      gpo   <= qd;
    end
  end
endmodule
