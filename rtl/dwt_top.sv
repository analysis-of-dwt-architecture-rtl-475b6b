// dwt_top: three-level pipelined lifting 2-D DWT with overlapped stripe-based
// scanning and no frame memory.
//
// An N x N image is fed stripe by stripe (stripes 2S pixels wide), one stripe
// row of 2S pixels per valid cycle, stripes left to right, rows top to bottom.
// overlap_buffer adds the 7 overlapped pixels of the preceding stripe,
// Arch 1 (S DPPs) computes level 1 and emits per valid cycle S pairs
// {LL1, LH1} or {HL1, HH1}. The LL1 groups go through a Splitter to Arch 2
// (S/4 DPPs, rows in 2 segments); its LL2 groups through a second Splitter to
// Arch 3 (S/16 DPPs, rows in 4 segments). Every level also brings out all four
// subbands of its own; only the LL of level 3 is a final low band.
//
// Output indexing per level j (S_j = S/4^(j-1), P_j = 2^(j-1)): lane k of an
// output with tag (stripe r, seg s, row m) is subband column (r*P_j+s)*S_j+k,
// row m. The subbands are those of the 9/7 DWT of the image with zero padding,
// shifted by one sample: column/row i of a level's subbands holds lifting index
// i-1, whose last index (N_j/2 - 1) is not produced.
//
// Throughput one stripe row per cycle: a whole image takes N*N/(2S) cycles plus
// a pipeline tail of a few tens of cycles. Defaults: S = 16 (32 pixels in
// parallel), 3 levels as in the architecture; N = 512 is this design's choice.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int N = 512,
  parameter int S = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] pix [2*S],
  // level 1
  output logic             l1_valid,
  output tag_t             l1_tag,
  output coef_t            l1_lo [S],
  output coef_t            l1_hi [S],
  // level 2
  output logic             l2_valid,
  output tag_t             l2_tag,
  output coef_t            l2_lo [S/4],
  output coef_t            l2_hi [S/4],
  // level 3
  output logic             l3_valid,
  output tag_t             l3_tag,
  output coef_t            l3_lo [S/16],
  output coef_t            l3_hi [S/16]
);
  localparam int STRIPES = N / (2 * S);
  localparam int S2 = S / 4;
  localparam int S3 = S / 16;

  // ---- input buffer ----
  logic  b_valid;
  coef_t b_x [2*S];
  coef_t b_o [NOVL];

  overlap_buffer #(.S(S), .N(N), .STRIPES(STRIPES)) u_buf (
    .clk, .rst_n, .in_valid, .pix,
    .out_valid(b_valid), .x(b_x), .o(b_o)
  );

  // ---- level 1 ----
  dwt_arch #(.LEVEL(1), .S(S), .P(1), .ROWS(N), .STRIPES(STRIPES)) u_arch1 (
    .clk, .rst_n, .in_valid(b_valid), .x(b_x), .o(b_o),
    .out_valid(l1_valid), .out_tag(l1_tag), .lo(l1_lo), .hi(l1_hi)
  );

  // ---- splitter 1 -> level 2 ----
  logic  s1_valid;
  coef_t s1_d [S/2];
  coef_t zero_o [NOVL];

  assign zero_o = '{default: '0};

  splitter #(.W(S)) u_split1 (
    .clk, .rst_n, .in_valid(l1_valid && !l1_tag.hi), .din(l1_lo),
    .out_valid(s1_valid), .dout(s1_d)
  );

  dwt_arch #(.LEVEL(2), .S(S2), .P(2), .ROWS(N / 2), .STRIPES(STRIPES)) u_arch2 (
    .clk, .rst_n, .in_valid(s1_valid), .x(s1_d), .o(zero_o),
    .out_valid(l2_valid), .out_tag(l2_tag), .lo(l2_lo), .hi(l2_hi)
  );

  // ---- splitter 2 -> level 3 ----
  logic  s2_valid;
  coef_t s2_d [S/8];

  splitter #(.W(S2)) u_split2 (
    .clk, .rst_n, .in_valid(l2_valid && !l2_tag.hi), .din(l2_lo),
    .out_valid(s2_valid), .dout(s2_d)
  );

  dwt_arch #(.LEVEL(3), .S(S3), .P(4), .ROWS(N / 4), .STRIPES(STRIPES)) u_arch3 (
    .clk, .rst_n, .in_valid(s2_valid), .x(s2_d), .o(zero_o),
    .out_valid(l3_valid), .out_tag(l3_tag), .lo(l3_lo), .hi(l3_hi)
  );

endmodule
