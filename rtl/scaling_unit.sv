// scaling_unit: final scaling of one column-DPP output pair.
//
// The flipped lifting leaves every coefficient multiplied by a known factor
// (the reciprocal lifting products and the 2^-K overflow prevention shifts of
// both 1-D passes). The scaling unit removes it with one constant multiply per
// output: for an L-column pair (sel_hi = 0) lo becomes LL and hi becomes LH,
// for an H-column pair lo becomes HL and hi becomes HH:
//   out = (K_sb * in) >>> SCALE_FRAC        (truncating)
// with the four constants of dwt_pkg. Two multipliers, one constant mux each.
// That a scaling unit follows the column DWT is the architecture's; its inner
// structure and the truncation are this design's choices.
//
// Timing: registered, one cycle.
module scaling_unit
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  sel_hi,   // 0: L column (LL, LH), 1: H column (HL, HH)
  input  coef_t lo_in,
  input  coef_t hi_in,
  output coef_t lo_out,
  output coef_t hi_out
);
  localparam int PW = DW + CW;

  const_t               k_lo, k_hi;
  logic signed [PW-1:0] p_lo, p_hi;

  always_comb begin
    k_lo = sel_hi ? K_HL : K_LL;
    k_hi = sel_hi ? K_HH : K_LH;
    p_lo = PW'(k_lo) * PW'(lo_in);
    p_hi = PW'(k_hi) * PW'(hi_in);
  end

  always_ff @(posedge clk) begin
    lo_out <= coef_t'(p_lo >>> SCALE_FRAC);
    hi_out <= coef_t'(p_hi >>> SCALE_FRAC);
  end

endmodule
