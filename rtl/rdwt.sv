// rdwt: row 1-D DWT of one decomposition level (Row-PU plus the source of the
// first DPP's partial results).
//
// A level-j rDWT processes one row segment of 2S samples per valid cycle.
// Level 1 (LEVEL = 1) receives 7 overlapped pixels of the preceding stripe
// with every row and regenerates the first DPP's partial results with the
// Auxiliary-PU, so nothing is stored between stripes.
// Levels above 1 receive each row in P = 2^(LEVEL-1) consecutive segments
// (the Splitters cut the rows). The first DPP of segment s>0 takes the partial
// results and last sample of segment s-1 of the same row, kept in chain
// registers. The first DPP of segment 0 takes those of the last segment of the
// same row in the preceding stripe, kept in a small per-row temporal memory of
// ROWS entries x 4 words (zero for the first stripe, which plays the role of
// the zero padding). Level 1 needs no such memory; the per-row store above
// level 1 is this design's choice where the architecture only says that level 1
// has no temporal memory.
//
// Interface: in_valid with in_tag (stripe, row, seg) and samples x[] (and o[] at
// level 1). out_valid/out_tag/lo[]/hi[] follow 4 cycles later. Lane k of the
// output is the pair (s2, d2) with index one less than DPP k's own, so the
// first lane of a segment completes the segment left of it.
module rdwt
  import dwt_pkg::*;
#(
  parameter int LEVEL = 1,
  parameter int S     = 16,
  parameter int P     = 1,    // segments per row
  parameter int ROWS  = 512   // rows per stripe at this level
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  tag_t  in_tag,
  input  coef_t x [2*S],
  input  coef_t o [NOVL],     // overlapped pixels (used at level 1 only)
  output logic  out_valid,
  output tag_t  out_tag,
  output coef_t lo [S],
  output coef_t hi [S]
);
  coef_t xe_in, p_d1, p_s1, p_d2, po_d1, po_s1, po_d2;

  logic [4:1] v_q;
  tag_t       tag_q [4:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[3:1], in_valid};
  end

  always_ff @(posedge clk) begin
    tag_q[1] <= in_tag;
    for (int i = 2; i <= 4; i++) tag_q[i] <= tag_q[i-1];
  end

  row_pu #(.S(S)) u_row_pu (
    .clk, .x, .xe_in, .p_d1, .p_s1, .p_d2,
    .po_d1, .po_s1, .po_d2, .lo, .hi
  );

  if (LEVEL == 1) begin : g_aux
    aux_pu u_aux (.clk, .o, .po_d1(p_d1), .po_s1(p_s1), .po_d2(p_d2));
    assign xe_in = o[NOVL-1];
  end else begin : g_store
    // temporal memory: one entry per row, written by the last segment
    coef_t tm_x  [ROWS];
    coef_t tm_d1 [ROWS];
    coef_t tm_s1 [ROWS];
    coef_t tm_d2 [ROWS];
    // chain registers: values of the previous segment of the same row
    coef_t ch_x, ch_d1, ch_s1, ch_d2;

    localparam int RW = $clog2(ROWS);

    function automatic logic first_seg(tag_t t);
      return t.seg == 8'd0;
    endfunction
    function automatic logic zero_src(tag_t t);
      return t.seg == 8'd0 && t.stripe == 16'd0;
    endfunction
    function automatic logic last_seg(tag_t t);
      return t.seg == 8'(P - 1);
    endfunction

    always_comb begin
      xe_in = zero_src(in_tag)    ? '0 :
              first_seg(in_tag)   ? tm_x[in_tag.row[RW-1:0]] : ch_x;
      p_d1  = zero_src(tag_q[1])  ? '0 :
              first_seg(tag_q[1]) ? tm_d1[tag_q[1].row[RW-1:0]] : ch_d1;
      p_s1  = zero_src(tag_q[2])  ? '0 :
              first_seg(tag_q[2]) ? tm_s1[tag_q[2].row[RW-1:0]] : ch_s1;
      p_d2  = zero_src(tag_q[3])  ? '0 :
              first_seg(tag_q[3]) ? tm_d2[tag_q[3].row[RW-1:0]] : ch_d2;
    end

    always_ff @(posedge clk) begin
      if (in_valid) begin
        ch_x <= x[2*S-1];
        if (last_seg(in_tag)) tm_x[in_tag.row[RW-1:0]] <= x[2*S-1];
      end
      if (v_q[1]) begin
        ch_d1 <= po_d1;
        if (last_seg(tag_q[1])) tm_d1[tag_q[1].row[RW-1:0]] <= po_d1;
      end
      if (v_q[2]) begin
        ch_s1 <= po_s1;
        if (last_seg(tag_q[2])) tm_s1[tag_q[2].row[RW-1:0]] <= po_s1;
      end
      if (v_q[3]) begin
        ch_d2 <= po_d2;
        if (last_seg(tag_q[3])) tm_d2[tag_q[3].row[RW-1:0]] <= po_d2;
      end
    end
  end

  assign out_valid = v_q[4];
  assign out_tag   = tag_q[4];

endmodule
