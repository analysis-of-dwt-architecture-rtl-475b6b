// dpp: Data Processing Pipe, four lifting Cells that compute one 9/7 lifting
// unit of a sample sequence z[].
//
// Unit n takes the pixel pair z[2n+1] (xo), z[2n+2] (xe1) plus the shared even
// sample z[2n] (xe0) and the partial results of unit n-1, and computes
//   stage 1: d1[n]   = cell(C1; z[2n+1] | z[2n],   z[2n+2])
//   stage 2: s1[n]   = cell(C2; z[2n]   | d1[n-1], d1[n])
//   stage 3: d2[n-1] = cell(C3; d1[n-1] | s1[n-1], s1[n])
//   stage 4: s2[n-1] = cell(C4; s1[n-1] | d2[n-2], d2[n-1])
// It hands d1[n], s1[n], d2[n-1] on as partial results and outputs the
// high-pass d2[n-1] and low-pass s2[n-1] (both still unscaled).
//
// Timing: xe0/xo/xe1 are sampled in cycle t. The partial inputs are needed one
// stage later each: p_d1 (= d1[n-1]) in cycle t+1, p_s1 (= s1[n-1]) in t+2,
// p_d2 (= d2[n-2]) in t+3. The partial outputs appear with the same offsets
// (po_d1 in t+1, po_s1 in t+2, po_d2 in t+3), so chained DPPs line up without
// extra registers. lo/hi appear in cycle t+4. Fully pipelined, one unit per
// cycle. The cell arrangement and stage order follow the architecture's DPP;
// the exact register placement is this design's choice.
module dpp
  import dwt_pkg::*;
(
  input  logic  clk,
  input  coef_t xe0,    // z[2n]     (cycle t)
  input  coef_t xo,     // z[2n+1]   (cycle t)
  input  coef_t xe1,    // z[2n+2]   (cycle t)
  input  coef_t p_d1,   // d1[n-1]   (cycle t+1)
  input  coef_t p_s1,   // s1[n-1]   (cycle t+2)
  input  coef_t p_d2,   // d2[n-2]   (cycle t+3)
  output coef_t po_d1,  // d1[n]     (cycle t+1)
  output coef_t po_s1,  // s1[n]     (cycle t+2)
  output coef_t po_d2,  // d2[n-1]   (cycle t+3)
  output coef_t lo,     // s2[n-1]   (cycle t+4)
  output coef_t hi      // d2[n-1]   (cycle t+4)
);
  coef_t xe0_q, pd1_q, ps1_q, d1, s1, d2, s2;

  always_ff @(posedge clk) begin
    xe0_q <= xe0;    // centre of stage 2
    pd1_q <= p_d1;   // centre of stage 3
    ps1_q <= p_s1;   // centre of stage 4
    hi    <= d2;     // align high-pass with low-pass
  end

  lift_cell #(.COEF(C1)) u_c1 (.clk, .m(xo),    .a(xe0),  .b(xe1), .q(d1));
  lift_cell #(.COEF(C2)) u_c2 (.clk, .m(xe0_q), .a(p_d1), .b(d1),  .q(s1));
  lift_cell #(.COEF(C3)) u_c3 (.clk, .m(pd1_q), .a(p_s1), .b(s1),  .q(d2));
  lift_cell #(.COEF(C4)) u_c4 (.clk, .m(ps1_q), .a(p_d2), .b(d2),  .q(s2));

  assign po_d1 = d1;
  assign po_s1 = s1;
  assign po_d2 = d2;
  assign lo    = s2;

endmodule
