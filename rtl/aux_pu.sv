// aux_pu: Auxiliary processing unit of the level-1 row transform.
//
// Instead of storing the three partial results that the last DPP of the
// preceding stripe produced, they are recomputed from the 7 overlapped pixels
// o[0..6] = z[2n-4] .. z[2n+2] of the current row (n = index of the lifting
// unit just left of the stripe) with six Cells:
//   stage 1: d1[n-2], d1[n-1], d1[n]
//   stage 2: s1[n-1], s1[n]
//   stage 3: d2[n-1]
// Outputs d1[n], s1[n], d2[n-1] are exactly the partial-result inputs of the
// first DPP of the Row-PU and are timed like a DPP's partial outputs:
// po_d1 in cycle t+1, po_s1 in t+2, po_d2 in t+3 for pixels given in cycle t.
// The six-cell structure follows the architecture; the index mapping is
// derived from the 9/7 lifting dependency graph.
module aux_pu
  import dwt_pkg::*;
(
  input  logic  clk,
  input  coef_t o [NOVL],   // overlapped pixels, oldest column first (cycle t)
  output coef_t po_d1,      // d1[n]   (cycle t+1)
  output coef_t po_s1,      // s1[n]   (cycle t+2)
  output coef_t po_d2       // d2[n-1] (cycle t+3)
);
  coef_t d1m2, d1m1, d1n, s1m1, s1n;
  coef_t o2_q, o4_q, d1m1_q;

  always_ff @(posedge clk) begin
    o2_q   <= o[2];
    o4_q   <= o[4];
    d1m1_q <= d1m1;
  end

  lift_cell #(.COEF(C1)) u_d1a (.clk, .m(o[1]), .a(o[0]), .b(o[2]), .q(d1m2));
  lift_cell #(.COEF(C1)) u_d1b (.clk, .m(o[3]), .a(o[2]), .b(o[4]), .q(d1m1));
  lift_cell #(.COEF(C1)) u_d1c (.clk, .m(o[5]), .a(o[4]), .b(o[6]), .q(d1n));
  lift_cell #(.COEF(C2)) u_s1a (.clk, .m(o2_q), .a(d1m2), .b(d1m1), .q(s1m1));
  lift_cell #(.COEF(C2)) u_s1b (.clk, .m(o4_q), .a(d1m1), .b(d1n),  .q(s1n));
  lift_cell #(.COEF(C3)) u_d2  (.clk, .m(d1m1_q), .a(s1m1), .b(s1n), .q(po_d2));

  assign po_d1 = d1n;
  assign po_s1 = s1n;

endmodule
