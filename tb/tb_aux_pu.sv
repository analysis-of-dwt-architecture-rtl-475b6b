// tb_aux_pu: random 7-pixel overlap windows every cycle; the three partial
// results are compared with a 1-D reference transform of a sequence whose last
// samples are the window (the partials d1[n], s1[n], d2[n-1] of the unit just
// left of a stripe), at their latencies t+1, t+2, t+3.
module tb_aux_pu;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NT = 2000;

  logic  clk = 1'b0;
  coef_t o [NOVL];
  coef_t po_d1, po_s1, po_d2;
  int    checks = 0, failures = 0;
  int    win [NT+4][NOVL];

  always #5 clk = ~clk;

  aux_pu dut (.*);

  // reference: window = z[2n-4 .. 2n+2]; compute the lifting over those
  // samples directly from the lifting equations
  function automatic void partials(input int w[NOVL], output int d1n, output int s1n,
                                   output int d2n1);
    int d1[3], s1[2];
    for (int i = 0; i < 3; i++) d1[i] = ref_cell(C1, w[2*i+1], w[2*i], w[2*i+2]);
    for (int i = 0; i < 2; i++) s1[i] = ref_cell(C2, w[2*i+2], d1[i], d1[i+1]);
    d1n  = d1[2];
    s1n  = s1[1];
    d2n1 = ref_cell(C3, d1[1], s1[0], s1[1]);
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int a, b, c;
    foreach (win[i, j]) win[i][j] = $urandom_range(0, 255);
    for (int t = 0; t < NT + 3; t++) begin
      foreach (o[j]) o[j] = coef_t'(win[t][j]);
      @(posedge clk);
      #1;
      partials(win[t], a, b, c);
      chk("po_d1", int'(po_d1), a);
      if (t >= 1) begin
        partials(win[t-1], a, b, c);
        chk("po_s1", int'(po_s1), b);
      end
      if (t >= 2) begin
        partials(win[t-2], a, b, c);
        chk("po_d2", int'(po_d2), c);
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
