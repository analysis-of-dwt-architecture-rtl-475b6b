// transpose_reg: transposition registers between the row and the column DWT
// of one level, one lane per DPP.
//
// The rDWT delivers, per lane, one (L, H) pair per row. The column DWT needs
// the values of one column two rows at a time, and it handles the L column and
// the H column of a lane in alternate cycles. For every lane this block keeps
// the even row's (L, H) of each of the P row segments; when the odd row of a
// segment arrives it queues two entries: the L pair (L[2m], L[2m+1]) and the H
// pair (H[2m], H[2m+1]). One entry leaves per cycle, so the output is the
// interleaved sequence L-pair, H-pair, ... that the column DWT consumes.
// The pairing and interleaving follow the architecture; the short queue
// (DEPTH = 4P entries, needed when P segments are interleaved) is this
// design's own way of sequencing it.
//
// Timing: an entry queued in cycle u leaves at the earliest in cycle u+1
// (registered output). out_tag.row is the row pair number m, out_tag.hi tells
// an H pair from an L pair.
module transpose_reg
  import dwt_pkg::*;
#(
  parameter int S = 16,
  parameter int P = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  tag_t  in_tag,     // row number and segment of lo/hi
  input  coef_t lo [S],
  input  coef_t hi [S],
  output logic  out_valid,
  output tag_t  out_tag,
  output coef_t ev [S],     // value of row 2m
  output coef_t od [S]      // value of row 2m+1
);
  localparam int DEPTH = 4 * P;
  localparam int AW    = $clog2(DEPTH);
  localparam int SW    = P > 1 ? $clog2(P) : 1;

  coef_t even_lo [P][S];
  coef_t even_hi [P][S];

  coef_t q_ev  [DEPTH][S];
  coef_t q_od  [DEPTH][S];
  tag_t  q_tag [DEPTH];

  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  logic push2, pop;
  tag_t tag_l, tag_h;

  always_comb begin
    push2 = in_valid && in_tag.row[0];
    pop   = count != '0;
    tag_l = in_tag;
    tag_l.row = in_tag.row >> 1;
    tag_l.hi  = 1'b0;
    tag_h = tag_l;
    tag_h.hi  = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid && !in_tag.row[0]) begin
      even_lo[in_tag.seg[SW-1:0]] <= lo;
      even_hi[in_tag.seg[SW-1:0]] <= hi;
    end
    if (push2) begin
      q_ev[wptr]      <= even_lo[in_tag.seg[SW-1:0]];
      q_od[wptr]      <= lo;
      q_tag[wptr]     <= tag_l;
      q_ev[wptr + 1'b1]  <= even_hi[in_tag.seg[SW-1:0]];
      q_od[wptr + 1'b1]  <= hi;
      q_tag[wptr + 1'b1] <= tag_h;
    end
    if (pop) begin
      ev      <= q_ev[rptr];
      od      <= q_od[rptr];
      out_tag <= q_tag[rptr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (push2) wptr <= wptr + AW'(2);
      if (pop)   rptr <= rptr + 1'b1;
      count     <= count + (push2 ? (AW+1)'(2) : '0) - (pop ? (AW+1)'(1) : '0);
      out_valid <= pop;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push2 |-> count <= (AW+1)'(DEPTH - 2));

endmodule
