// dwt_arch: Arch j, one level of the 2-D DWT (rDWT, transposition registers,
// cDWT and scaling units).
//
// Input is a stream of row segments of 2S samples: at level 1 one whole stripe
// row (2S pixels plus the 7 overlapped pixels of the preceding stripe) per
// valid cycle; at level j > 1 each row of the LL band of the level below in
// P = 2^(j-1) consecutive segments. The image is scanned stripe by stripe and,
// inside a stripe, row by row from the top; counters here number every valid
// segment (segment, row, stripe) and that tag travels with the data.
// rDWT -> transposition registers -> cDWT -> scaling units; the output is one
// subband pair per lane and valid cycle: {LL, LH} (out_tag.hi = 0) or
// {HL, HH} (out_tag.hi = 1).
//
// Output indexing: lane k of segment s of stripe r is column
// (r*P + s)*S + k of the level's subbands (counted from 0), out_tag.row is the
// subband row. Latency from input to output is 10 cycles plus the wait in the
// transposition queue. Throughput: one segment per cycle.
module dwt_arch
  import dwt_pkg::*;
#(
  parameter int LEVEL   = 1,
  parameter int S       = 16,          // DPPs in the rDWT and in the cDWT
  parameter int P       = 1,           // segments per row (2^(LEVEL-1))
  parameter int ROWS    = 512,         // rows of a stripe at this level
  parameter int STRIPES = 16           // stripes of the image
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t x [2*S],
  input  coef_t o [NOVL],      // overlapped pixels (level 1 only)
  output logic  out_valid,
  output tag_t  out_tag,
  output coef_t lo [S],        // LL or HL
  output coef_t hi [S]         // LH or HH
);
  // ---- input scan counters ----
  tag_t in_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_tag <= '0;
    end else if (in_valid) begin
      if (in_tag.seg == 8'(P - 1)) begin
        in_tag.seg <= '0;
        if (in_tag.row == 16'(ROWS - 1)) begin
          in_tag.row    <= '0;
          in_tag.stripe <= (in_tag.stripe == 16'(STRIPES - 1)) ? '0 : in_tag.stripe + 1'b1;
        end else begin
          in_tag.row <= in_tag.row + 1'b1;
        end
      end else begin
        in_tag.seg <= in_tag.seg + 1'b1;
      end
    end
  end

  // ---- row DWT ----
  logic  r_valid;
  tag_t  r_tag;
  coef_t r_lo [S];
  coef_t r_hi [S];

  rdwt #(.LEVEL(LEVEL), .S(S), .P(P), .ROWS(ROWS)) u_rdwt (
    .clk, .rst_n, .in_valid, .in_tag, .x, .o,
    .out_valid(r_valid), .out_tag(r_tag), .lo(r_lo), .hi(r_hi)
  );

  // ---- transposition ----
  logic  t_valid;
  tag_t  t_tag;
  coef_t t_ev [S];
  coef_t t_od [S];

  transpose_reg #(.S(S), .P(P)) u_tr (
    .clk, .rst_n, .in_valid(r_valid), .in_tag(r_tag), .lo(r_lo), .hi(r_hi),
    .out_valid(t_valid), .out_tag(t_tag), .ev(t_ev), .od(t_od)
  );

  // ---- column DWT ----
  logic  c_valid;
  tag_t  c_tag;
  coef_t c_lo [S];
  coef_t c_hi [S];

  cdwt #(.S(S), .P(P)) u_cdwt (
    .clk, .rst_n, .in_valid(t_valid), .in_tag(t_tag), .ev(t_ev), .od(t_od),
    .out_valid(c_valid), .out_tag(c_tag), .lo(c_lo), .hi(c_hi)
  );

  // ---- scaling ----
  for (genvar k = 0; k < S; k++) begin : g_su
    scaling_unit u_su (
      .clk, .sel_hi(c_tag.hi), .lo_in(c_lo[k]), .hi_in(c_hi[k]),
      .lo_out(lo[k]), .hi_out(hi[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= c_valid;
  end

  always_ff @(posedge clk) out_tag <= c_tag;

endmodule
