// tb_dwt_top_full: the end-to-end test of tb_dwt_top with dwt_top at its
// default size (N = 512, S = 16: 16 stripes, 8192 input cycles per image).
// One random image is streamed, one stripe row per cycle without idle cycles;
// the largest intermediate value is reported. Every output coefficient of
// every level and subband is compared with the reference 3-level transform.
// It also counts the mechanisms of the design and fails if one never happened:
// zero-padded first stripes, overlapped pixels from a preceding stripe,
// segments chained inside a row (levels 2 and 3), rows resumed from the
// per-row partial store (levels 2 and 3), both halves of both splitters, and
// transposition queues holding more than one pair. Throughput: the input
// never stalls, and the last output must follow the last input within 80
// cycles.
module tb_dwt_top_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 512;   // dwt_top default
  localparam int S = 16;    // dwt_top default
  localparam int NIMG = 1;
  localparam int STRIPES = N / (2 * S);

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             in_valid;
  logic [PIX_W-1:0] pix [2*S];
  logic             l1_valid, l2_valid, l3_valid;
  tag_t             l1_tag, l2_tag, l3_tag;
  coef_t            l1_lo [S];
  coef_t            l1_hi [S];
  coef_t            l2_lo [S/4];
  coef_t            l2_hi [S/4];
  coef_t            l3_lo [S/16];
  coef_t            l3_hi [S/16];

  int   checks = 0, failures = 0, cyc = 0;
  img_t img [NIMG];
  img_t sb [NIMG][3][4];       // [image][level][LL, LH, HL, HH]
  int   nout [3];              // output entries per level
  int   img_of [3];            // image each level is currently producing
  int   last_in = 0, last_out = 0;
  // mechanism counters
  int   n_pad = 0, n_ovl = 0, n_chain2 = 0, n_chain3 = 0, n_store2 = 0, n_store3 = 0;
  int   n_split1 = 0, n_split2 = 0, n_queue = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dwt_top dut (.*);

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // compares one output entry of level lv (0-based) with the reference
  task automatic check_level(int lv, tag_t t, int nl, coef_t lo [], coef_t hi []);
    int m, col, f, sj, pj;
    sj = S >> (2 * lv);
    pj = 1 << lv;
    f  = img_of[lv];
    m  = int'(t.row);
    for (int k = 0; k < nl; k++) begin
      col = (int'(t.stripe) * pj + int'(t.seg)) * sj + k;
      if (!t.hi) begin
        chk(int'(lo[k]), sb[f][lv][0][m][col], $sformatf("level %0d LL", lv + 1));
        chk(int'(hi[k]), sb[f][lv][1][m][col], $sformatf("level %0d LH", lv + 1));
      end else begin
        chk(int'(lo[k]), sb[f][lv][2][m][col], $sformatf("level %0d HL", lv + 1));
        chk(int'(hi[k]), sb[f][lv][3][m][col], $sformatf("level %0d HH", lv + 1));
      end
    end
    nout[lv]++;
    // one image gives (N_j/2 row pairs) x 2 entries x (stripes x P_j segments)
    if (nout[lv] % ((N >> lv) * STRIPES * pj) == 0) img_of[lv]++;
    last_out = cyc;
  endtask

  initial begin
    for (int f = 0; f < NIMG; f++) begin
      img_t cur, a, b, c, d;
      img[f] = make_image(N, 17 * f + 1);
      // extreme patterns: full-scale checkerboard and 2-pixel bars, which
      // drive the high bands and the internal word length hardest
      if (f == 1) foreach (img[f][y, x]) img[f][y][x] = ((x + y) % 2) * 255;
      if (f == 2) foreach (img[f][y, x]) img[f][y][x] = (((x / 2) + (y / 2)) % 2) * 255;
      cur = img[f];
      for (int lv = 0; lv < 3; lv++) begin
        dwt2d(cur, a, b, c, d);
        sb[f][lv][0] = a; sb[f][lv][1] = b; sb[f][lv][2] = c; sb[f][lv][3] = d;
        cur = a;
      end
    end
    in_valid = 1'b0;
    foreach (pix[i]) pix[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NIMG; f++)
      for (int r = 0; r < STRIPES; r++)
        for (int y = 0; y < N; y++) begin
          @(negedge clk);
          // image 3 arrives with random idle cycles
          if (f == 3) begin
            in_valid = 1'b0;
            while ($urandom_range(0, 3) == 0) @(negedge clk);
          end
          in_valid = 1'b1;
          for (int i = 0; i < 2*S; i++) pix[i] = PIX_W'(img[f][y][2*S*r + i]);
          last_in = cyc;
        end
    @(negedge clk);
    in_valid = 1'b0;
  end

  always @(negedge clk) if (rst_n) begin
    if (l1_valid) check_level(0, l1_tag, S, l1_lo, l1_hi);
    if (l2_valid) check_level(1, l2_tag, S/4, l2_lo, l2_hi);
    if (l3_valid) check_level(2, l3_tag, S/16, l3_lo, l3_hi);
  end

  // mechanism counters, observed inside the design
  always @(negedge clk) if (rst_n) begin
    if (dut.u_arch1.in_valid && dut.u_arch1.in_tag.stripe == 0) n_pad++;
    if (dut.u_arch1.in_valid && dut.u_arch1.in_tag.stripe != 0) n_ovl++;
    if (dut.u_arch2.in_valid && dut.u_arch2.in_tag.seg != 0) n_chain2++;
    if (dut.u_arch3.in_valid && dut.u_arch3.in_tag.seg != 0) n_chain3++;
    if (dut.u_arch2.in_valid && dut.u_arch2.in_tag.seg == 0 && dut.u_arch2.in_tag.stripe != 0) n_store2++;
    if (dut.u_arch3.in_valid && dut.u_arch3.in_tag.seg == 0 && dut.u_arch3.in_tag.stripe != 0) n_store3++;
    if (dut.u_split1.pending) n_split1++;
    if (dut.u_split2.pending) n_split2++;
    if (dut.u_arch3.u_tr.count > 1) n_queue++;
  end

  initial begin
    int exp1;
    exp1 = NIMG * N * STRIPES;
    wait (nout[0] == exp1 && nout[1] == exp1 && nout[2] == exp1);
    repeat (50) @(posedge clk);
    chk(nout[0], exp1, "level 1 entries");
    chk(nout[1], exp1, "level 2 entries");
    chk(nout[2], exp1, "level 3 entries");
    checks++;
    if (last_out - last_in > 80) begin
      failures++;
      $display("tail latency %0d cycles", last_out - last_in);
    end
    $display("largest lifting node magnitude %0d (signed range %0d)", ref_peak, 1 << (DW - 1));
    $display("image cycles %0d, tail latency %0d cycles", last_in, last_out - last_in);
    $display("mechanisms: pad %0d overlap %0d chain2 %0d chain3 %0d store2 %0d store3 %0d split1 %0d split2 %0d queue %0d",
             n_pad, n_ovl, n_chain2, n_chain3, n_store2, n_store3, n_split1, n_split2, n_queue);
    if (n_pad == 0 || n_ovl == 0 || n_chain2 == 0 || n_chain3 == 0 || n_store2 == 0 ||
        n_store3 == 0 || n_split1 == 0 || n_split2 == 0 || n_queue == 0)
      failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NIMG * N * STRIPES + 2000) @(posedge clk);
    failures++;
    $display("timeout: entries %0d %0d %0d", nout[0], nout[1], nout[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
