// splitter: interface between two decomposition levels.
//
// The LL coefficients of a level arrive as a group of W values at most every
// second cycle. The splitter passes the first half of the group straight to
// the next level through its output multiplexer and keeps the second half in
// the segment register, which it sends through the multiplexer in the
// following cycle. The next level thus sees the row in two halves at half the
// width and twice the rate. Structure as in the architecture.
//
// Timing: first half combinationally in the arrival cycle, second half one
// cycle later. A new group must not arrive in the cycle right after a group
// (asserted).
module splitter
  import dwt_pkg::*;
#(
  parameter int W = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  coef_t din [W],
  output logic  out_valid,
  output coef_t dout [W/2]
);
  coef_t seg_reg [W/2];
  logic  pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= 1'b0;
    else        pending <= in_valid;
  end

  always_ff @(posedge clk)
    if (in_valid) seg_reg <= din[W/2 +: W/2];

  always_comb begin
    out_valid = in_valid || pending;
    dout      = pending ? seg_reg : din[0 +: W/2];
  end

  a_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |=> !in_valid);

endmodule
