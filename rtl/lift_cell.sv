// lift_cell: one node of the flipped lifting data flow graph.
//
// Computes  q <= ((COEF * m) >>> (COEF_FRAC + K)) + (a >>> K) + (b >>> K)
// i.e. the node's own sample m times a constant reciprocal lifting
// coefficient, plus its two neighbours a and b, with all three terms scaled by
// the overflow prevention factor 2^-K (arithmetic right shifts, hard-wired).
// One multiplier and two adders, so the register-to-register path is one
// multiplier plus one adder (the shifts are wiring). The structure follows the
// architecture's Cell; truncating shifts and the output register are this
// design's choices.
//
// Timing: result registered, one cycle after the inputs. No reset: the value
// of a cell is only used when the valid bit travelling beside it says so.
module lift_cell
  import dwt_pkg::*;
#(
  parameter const_t COEF = C1
) (
  input  logic  clk,
  input  coef_t m,   // centre sample (multiplied)
  input  coef_t a,   // left neighbour
  input  coef_t b,   // right neighbour
  output coef_t q
);
  localparam int PW = DW + CW;

  logic signed [PW-1:0] prod;
  coef_t                term;

  always_comb begin
    prod = PW'(COEF) * PW'(m);
    term = coef_t'(prod >>> (COEF_FRAC + KSH));
  end

  always_ff @(posedge clk)
    q <= term + (a >>> KSH) + (b >>> KSH);

endmodule
