// cdwt: column 1-D DWT of one level, S independent DPPs.
//
// Every cycle DPP k takes one entry of the transposition registers: the values
// of rows 2m and 2m+1 of one column (z[2m+1], z[2m+2] of that column's
// sequence). Entries of different columns (the L and the H column of each
// lane, and of each of the P row segments) are interleaved, so the partial
// results a DPP needs for an entry are the ones it produced for the previous
// entry of the same column, two or more cycles before. They are kept in small
// per-column state tables (2P entries per lane: the last odd-row sample and
// d1, s1, d2), written when a stage finishes an entry and read when the same
// stage starts the next entry of that column. Row pair 0 of a column reads
// zeros (the zero padding above the image).
// Per entry the DPP yields a low/high pair: LL and LH for an L column, HL and
// HH for an H column (still unscaled), for row pair index m-1.
// The independent DPPs and the interleaved partial-result feedback follow the
// architecture; the indexed state tables are this design's way of holding them.
//
// Timing: in cycle t the entry enters; out_valid/out_tag/lo/hi in cycle t+4.
// Any pattern of valid cycles is accepted.
module cdwt
  import dwt_pkg::*;
#(
  parameter int S = 16,
  parameter int P = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  tag_t  in_tag,
  input  coef_t ev [S],
  input  coef_t od [S],
  output logic  out_valid,
  output tag_t  out_tag,
  output coef_t lo [S],
  output coef_t hi [S]
);
  localparam int NCOL = 2 * P;
  localparam int CIW  = $clog2(NCOL);

  logic [4:1] v_q;
  tag_t       tag_q [4:1];

  function automatic logic [CIW-1:0] col_idx(tag_t t);
    return CIW'({t.seg, t.hi});
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[3:1], in_valid};
  end

  always_ff @(posedge clk) begin
    tag_q[1] <= in_tag;
    for (int i = 2; i <= 4; i++) tag_q[i] <= tag_q[i-1];
  end

  for (genvar k = 0; k < S; k++) begin : g_lane
    coef_t st_x  [NCOL];
    coef_t st_d1 [NCOL];
    coef_t st_s1 [NCOL];
    coef_t st_d2 [NCOL];
    coef_t xe0, p_d1, p_s1, p_d2, po_d1, po_s1, po_d2;

    always_comb begin
      xe0  = in_tag.row   == '0 ? '0 : st_x [col_idx(in_tag)];
      p_d1 = tag_q[1].row == '0 ? '0 : st_d1[col_idx(tag_q[1])];
      p_s1 = tag_q[2].row == '0 ? '0 : st_s1[col_idx(tag_q[2])];
      p_d2 = tag_q[3].row == '0 ? '0 : st_d2[col_idx(tag_q[3])];
    end

    always_ff @(posedge clk) begin
      if (in_valid) st_x [col_idx(in_tag)]   <= od[k];
      if (v_q[1])   st_d1[col_idx(tag_q[1])] <= po_d1;
      if (v_q[2])   st_s1[col_idx(tag_q[2])] <= po_s1;
      if (v_q[3])   st_d2[col_idx(tag_q[3])] <= po_d2;
    end

    dpp u_dpp (
      .clk,
      .xe0, .xo(ev[k]), .xe1(od[k]),
      .p_d1, .p_s1, .p_d2,
      .po_d1, .po_s1, .po_d2,
      .lo(lo[k]), .hi(hi[k])
    );
  end

  assign out_valid = v_q[4];
  assign out_tag   = tag_q[4];

endmodule
