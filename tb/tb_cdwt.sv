// tb_cdwt: a column DWT of S = 2 DPPs handling P = 2 segments, i.e. 4
// interleaved columns per DPP (L and H column of each segment). Random column
// data are fed as the transposition registers would deliver them (row pair m:
// segment 0 L, segment 0 H, segment 1 L, segment 1 H), with random idle
// cycles. Each output pair is compared with the 1-D reference transform of its
// column, found by the output tag.
module tb_cdwt;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int S = 2, P = 2, NR = 20;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, out_valid;
  tag_t  in_tag, out_tag;
  coef_t ev [S];
  coef_t od [S];
  coef_t lo [S];
  coef_t hi [S];
  int    checks = 0, failures = 0, seen = 0;
  arr_t  col [P][2][S];
  arr_t  elo [P][2][S];
  arr_t  ehi [P][2][S];

  always #5 clk = ~clk;

  cdwt #(.S(S), .P(P)) dut (.*);

  initial begin
    foreach (col[s, h, k]) begin
      arr_t a, b;
      col[s][h][k] = new[NR];
      foreach (col[s][h][k][y]) col[s][h][k][y] = int'($urandom_range(0, 3000)) - 1000;
      lift1d(col[s][h][k], a, b);
      elo[s][h][k] = a;
      ehi[s][h][k] = b;
    end
    in_valid = 1'b0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NR / 2; m++)
      for (int s = 0; s < P; s++)
        for (int h = 0; h < 2; h++) begin
          @(negedge clk);
          in_valid = 1'b0;
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1'b1;
          in_tag = '0; in_tag.row = 16'(m); in_tag.seg = 8'(s); in_tag.hi = h[0];
          for (int k = 0; k < S; k++) begin
            ev[k] = coef_t'(col[s][h][k][2*m]);
            od[k] = coef_t'(col[s][h][k][2*m+1]);
          end
        end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int m, s, h;
    m = int'(out_tag.row); s = int'(out_tag.seg); h = int'(out_tag.hi);
    for (int k = 0; k < S; k++) begin
      checks += 2;
      if (int'(lo[k]) != elo[s][h][k][m] || int'(hi[k]) != ehi[s][h][k][m]) begin
        failures++;
        if (failures < 10) $display("m%0d s%0d h%0d k%0d: got %0d/%0d exp %0d/%0d", m, s, h, k,
                                    lo[k], hi[k], elo[s][h][k][m], ehi[s][h][k][m]);
      end
    end
    seen++;
  end

  initial begin
    wait (seen == NR / 2 * P * 2);
    repeat (5) @(posedge clk);
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
