// row_pu: Row processing unit, a chain of S identical DPPs.
//
// A row segment of 2S samples enters per cycle; DPP k takes samples 2k and
// 2k+1 of the segment as z[2n+1], z[2n+2] and the sample just left of them as
// z[2n] (for DPP 0 that is xe_in, the last sample of the preceding segment).
// The partial results run left to right through the chain: DPP 0 takes them
// from p_d1/p_s1/p_d2 (Auxiliary-PU or stored partials), DPP k>0 from DPP k-1.
// The last DPP's partial results are brought out; at level 1 they are unused.
//
// Timing: as for one DPP; pixels in cycle t, p_d1/p_s1/p_d2 in t+1/t+2/t+3,
// lo[k]/hi[k] in t+4. Lane k of the outputs is the coefficient pair whose
// lifting index is one less than DPP k's own, i.e. the output of a segment is
// shifted by one pair to the left (its first pair finishes the preceding
// segment).
module row_pu
  import dwt_pkg::*;
#(
  parameter int S = 16
) (
  input  logic  clk,
  input  coef_t x [2*S],  // segment samples, left to right (cycle t)
  input  coef_t xe_in,    // sample left of the segment (cycle t)
  input  coef_t p_d1,     // partials of the unit left of the segment
  input  coef_t p_s1,
  input  coef_t p_d2,
  output coef_t po_d1,    // partials of the last DPP
  output coef_t po_s1,
  output coef_t po_d2,
  output coef_t lo [S],
  output coef_t hi [S]
);
  coef_t cd1 [S+1];
  coef_t cs1 [S+1];
  coef_t cd2 [S+1];

  assign cd1[0] = p_d1;
  assign cs1[0] = p_s1;
  assign cd2[0] = p_d2;

  coef_t xe0 [S];

  assign xe0[0] = xe_in;
  for (genvar k = 1; k < S; k++) begin : g_xe0
    assign xe0[k] = x[2*k-1];
  end

  for (genvar k = 0; k < S; k++) begin : g_dpp
    dpp u_dpp (
      .clk,
      .xe0   (xe0[k]),
      .xo    (x[2*k]),
      .xe1   (x[2*k+1]),
      .p_d1  (cd1[k]),
      .p_s1  (cs1[k]),
      .p_d2  (cd2[k]),
      .po_d1 (cd1[k+1]),
      .po_s1 (cs1[k+1]),
      .po_d2 (cd2[k+1]),
      .lo    (lo[k]),
      .hi    (hi[k])
    );
  end

  assign po_d1 = cd1[S];
  assign po_s1 = cs1[S];
  assign po_d2 = cd2[S];

endmodule
