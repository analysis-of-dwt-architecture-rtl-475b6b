// tb_dwt_arch: one decomposition level, two configurations, each checked
// coefficient by coefficient against the reference 2-D transform (row
// transform, column transform, scaling) of a random 16 x 16 image.
//  - level 1: S = 4, 2 stripes, one stripe row plus 7 overlapped pixels per
//    cycle, continuous; also checks the latency from the last input row to the
//    last output (at most 12 cycles) and that every subband pair appears.
//  - level 2: S = 2, rows in P = 2 segments, 2 stripes, random idle cycles.
module tb_dwt_arch;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cyc = 0;
  img_t img, ll, lh, hl, hh;
  int   seen1 = 0, seen2 = 0, last_in1 = 0, last_out1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic chk_pair(tag_t t, int col, int lo, int hi, string what);
    int m;
    m = int'(t.row);
    if (!t.hi) begin
      chk(lo, ll[m][col], {what, " LL"});
      chk(hi, lh[m][col], {what, " LH"});
    end else begin
      chk(lo, hl[m][col], {what, " HL"});
      chk(hi, hh[m][col], {what, " HH"});
    end
  endtask

  // ---------------- level 1 ----------------
  localparam int S1 = 4, R1 = N / (2 * S1);
  logic  v1, ov1;
  tag_t  ot1;
  coef_t x1 [2*S1];
  coef_t o1 [NOVL];
  coef_t lo1 [S1];
  coef_t hi1 [S1];

  dwt_arch #(.LEVEL(1), .S(S1), .P(1), .ROWS(N), .STRIPES(R1)) dut1 (
    .clk, .rst_n, .in_valid(v1), .x(x1), .o(o1),
    .out_valid(ov1), .out_tag(ot1), .lo(lo1), .hi(hi1));

  // ---------------- level 2 ----------------
  localparam int S2 = 2, P2 = 2, R2 = N / (2 * S2 * P2);
  logic  v2, ov2;
  tag_t  ot2;
  coef_t x2 [2*S2];
  coef_t o2 [NOVL];
  coef_t lo2 [S2];
  coef_t hi2 [S2];

  assign o2 = '{default: '0};

  dwt_arch #(.LEVEL(2), .S(S2), .P(P2), .ROWS(N), .STRIPES(R2)) dut2 (
    .clk, .rst_n, .in_valid(v2), .x(x2), .o(o2),
    .out_valid(ov2), .out_tag(ot2), .lo(lo2), .hi(hi2));

  initial begin
    img = make_image(N, 11);
    dwt2d(img, ll, lh, hl, hh);
    v1 = 1'b0; v2 = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        for (int r = 0; r < R1; r++)
          for (int y = 0; y < N; y++) begin
            @(negedge clk);
            v1 = 1'b1;
            for (int i = 0; i < 2*S1; i++) x1[i] = coef_t'(img[y][2*S1*r + i]);
            for (int i = 0; i < NOVL; i++) o1[i] = r == 0 ? '0 : coef_t'(img[y][2*S1*r - NOVL + i]);
            last_in1 = cyc;
          end
        @(negedge clk);
        v1 = 1'b0;
      end
      begin
        for (int r = 0; r < R2; r++)
          for (int y = 0; y < N; y++)
            for (int s = 0; s < P2; s++) begin
              @(negedge clk);
              v2 = 1'b0;
              while ($urandom_range(0, 3) == 0) @(negedge clk);
              v2 = 1'b1;
              for (int i = 0; i < 2*S2; i++) x2[i] = coef_t'(img[y][(r*P2 + s)*2*S2 + i]);
            end
        @(negedge clk);
        v2 = 1'b0;
      end
    join
  end

  always @(negedge clk) if (rst_n) begin
    if (ov1) begin
      for (int k = 0; k < S1; k++)
        chk_pair(ot1, int'(ot1.stripe) * S1 + k, int'(lo1[k]), int'(hi1[k]), "L1");
      seen1++;
      last_out1 = cyc;
    end
    if (ov2) begin
      for (int k = 0; k < S2; k++)
        chk_pair(ot2, (int'(ot2.stripe) * P2 + int'(ot2.seg)) * S2 + k,
                 int'(lo2[k]), int'(hi2[k]), "L2");
      seen2++;
    end
  end

  initial begin
    // every stripe yields N/2 row pairs, each as an L and an H entry
    wait (seen1 == R1 * N && seen2 == R2 * P2 * N);
    repeat (20) @(posedge clk);
    chk(seen1, R1 * N, "L1 outputs");
    chk(seen2, R2 * P2 * N, "L2 outputs");
    checks++;
    if (last_out1 - last_in1 > 12) begin
      failures++;
      $display("latency %0d", last_out1 - last_in1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
