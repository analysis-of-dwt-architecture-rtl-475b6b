// tb_rdwt: two row transforms, checked row by row against the 1-D reference.
//  - level 1 (S = 4): a 12-row, 4-stripe image (width 32) scanned stripe by
//    stripe with the 7 overlapped pixels of the preceding stripe (zero for the
//    first stripe); the Auxiliary-PU regenerates the partial results.
//  - level 2 (S = 2, rows in P = 2 segments, ROWS = 12): the same scan, but each
//    row of a stripe arrives in two segments; the partial results come from the
//    chain registers (second segment) and the per-row store (first segment of
//    later stripes). Valid cycles are interleaved with random idle cycles.
// Every output lane is matched by its tag to the reference row transform.
module tb_rdwt;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int S1 = 4, S2 = 2, P2 = 2, R = 4, NR = 12;
  localparam int W  = 2 * S1 * R;   // image width (same for both)

  logic  clk = 1'b0, rst_n = 1'b0;
  int    checks = 0, failures = 0;
  img_t  img, elo, ehi;
  int    seen1 = 0, seen2 = 0;

  always #5 clk = ~clk;

  // ---------------- level 1 ----------------
  logic  v1, ov1;
  tag_t  t1, ot1;
  coef_t x1 [2*S1];
  coef_t o1 [NOVL];
  coef_t lo1 [S1];
  coef_t hi1 [S1];

  rdwt #(.LEVEL(1), .S(S1), .P(1), .ROWS(NR)) dut1 (
    .clk, .rst_n, .in_valid(v1), .in_tag(t1), .x(x1), .o(o1),
    .out_valid(ov1), .out_tag(ot1), .lo(lo1), .hi(hi1));

  // ---------------- level 2 ----------------
  logic  v2, ov2;
  tag_t  t2, ot2;
  coef_t x2 [2*S2];
  coef_t o2 [NOVL];
  coef_t lo2 [S2];
  coef_t hi2 [S2];

  rdwt #(.LEVEL(2), .S(S2), .P(P2), .ROWS(NR)) dut2 (
    .clk, .rst_n, .in_valid(v2), .in_tag(t2), .x(x2), .o(o2),
    .out_valid(ov2), .out_tag(ot2), .lo(lo2), .hi(hi2));

  assign o2 = '{default: '0};

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d t=%0t", what, got, exp, $time);
    end
  endtask

  // reference and stimulus
  initial begin
    img = make_image(NR, 3);
    foreach (img[y]) begin
      img[y] = new[W];
      foreach (img[y][x]) img[y][x] = $urandom_range(0, 255);
    end
    elo = new[NR]; ehi = new[NR];
    foreach (img[y]) begin
      arr_t lo, hi;
      lift1d(img[y], lo, hi);
      elo[y] = lo;
      ehi[y] = hi;
    end
  end

  initial begin
    v1 = 1'b0;
    t1 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < R; r++)
      for (int y = 0; y < NR; y++) begin
        @(negedge clk);
        v1 = 1'b1;
        t1 = '0; t1.stripe = 16'(r); t1.row = 16'(y);
        for (int i = 0; i < 2*S1; i++) x1[i] = coef_t'(img[y][2*S1*r + i]);
        for (int i = 0; i < NOVL; i++)
          o1[i] = r == 0 ? '0 : coef_t'(img[y][2*S1*r - NOVL + i]);
      end
    @(negedge clk);
    v1 = 1'b0;
  end

  initial begin
    v2 = 1'b0;
    t2 = '0;
    repeat (3) @(posedge clk);
    for (int r = 0; r < R; r++)   // level-2 stripes are also 2*S2*P2 = 8 wide
      for (int y = 0; y < NR; y++)
        for (int s = 0; s < P2; s++) begin
          @(negedge clk);
          v2 = 1'b0;
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          v2 = 1'b1;
          t2 = '0; t2.stripe = 16'(r); t2.row = 16'(y); t2.seg = 8'(s);
          for (int i = 0; i < 2*S2; i++) x2[i] = coef_t'(img[y][(r*P2 + s)*2*S2 + i]);
        end
    @(negedge clk);
    v2 = 1'b0;
  end

  // checkers
  always @(negedge clk) begin
    if (rst_n && ov1) begin
      for (int k = 0; k < S1; k++) begin
        chk(int'(lo1[k]), elo[ot1.row][S1*ot1.stripe + k], "L1 lo");
        chk(int'(hi1[k]), ehi[ot1.row][S1*ot1.stripe + k], "L1 hi");
      end
      seen1++;
    end
    if (rst_n && ov2) begin
      for (int k = 0; k < S2; k++) begin
        int c, y;
        y = int'(ot2.row);
        c = (int'(ot2.stripe) * P2 + int'(ot2.seg)) * S2 + k;
        chk(int'(lo2[k]), elo[y][c], "L2 lo");
        chk(int'(hi2[k]), ehi[y][c], "L2 hi");
      end
      seen2++;
    end
  end

  initial begin
    wait (seen1 == R * NR && seen2 == R * NR * P2);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("missing outputs: level 1 %0d, level 2 %0d", seen1, seen2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
