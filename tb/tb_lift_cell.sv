// tb_lift_cell: checks the four flipped lifting cells (constants C1..C4) on
// random operands against the cell equation evaluated in 64-bit integers.
// One result per cycle, one cycle latency.
module tb_lift_cell;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic  clk = 1'b0;
  coef_t m, a, b;
  coef_t q [4];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  lift_cell #(.COEF(C1)) u0 (.clk, .m, .a, .b, .q(q[0]));
  lift_cell #(.COEF(C2)) u1 (.clk, .m, .a, .b, .q(q[1]));
  lift_cell #(.COEF(C3)) u2 (.clk, .m, .a, .b, .q(q[2]));
  lift_cell #(.COEF(C4)) u3 (.clk, .m, .a, .b, .q(q[3]));

  function automatic int rnd(int r);
    return int'($urandom_range(0, 2 * r)) - r;
  endfunction

  initial begin
    int exp [4];
    int lim;
    for (int i = 0; i < 2000; i++) begin
      // operand ranges that keep the result inside DW bits
      lim = (i < 1000) ? 255 : 20000;
      m = coef_t'(rnd(lim));
      a = coef_t'(rnd(lim * 4));
      b = coef_t'(rnd(lim * 4));
      exp[0] = ref_cell(C1, m, a, b);
      exp[1] = ref_cell(C2, m, a, b);
      exp[2] = ref_cell(C3, m, a, b);
      exp[3] = ref_cell(C4, m, a, b);
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(q[k]) != exp[k]) begin
          failures++;
          if (failures < 10) $display("cell %0d: m=%0d a=%0d b=%0d got %0d exp %0d",
                                      k, m, a, b, q[k], exp[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
