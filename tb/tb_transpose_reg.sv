// tb_transpose_reg: two transposition banks (S = 2 lanes; P = 1 and P = 2
// segments per row) fed with random (L, H) rows, continuously and with idle
// cycles. The expected output order is built independently: when the odd row
// of a segment arrives, first its L pair (even-row L, odd-row L) and then its
// H pair. Values, row pair numbers, segment and L/H flags are checked, and for
// continuous input the output must leave one entry per cycle without gaps.
module tb_transpose_reg;
  import dwt_pkg::*;

  localparam int S = 2, NR = 16;

  typedef struct {
    int   ev [S];
    int   od [S];
    int   m;
    int   seg;
    logic hi;
  } ent_t;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   done1 = 0, done2 = 0;

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s mismatch at %0t", what, $time);
    end
  endtask

  // ---------------- P = 1, continuous ----------------
  logic  v1, ov1;
  tag_t  t1, ot1;
  coef_t lo1 [S];
  coef_t hi1 [S];
  coef_t ev1 [S];
  coef_t od1 [S];
  ent_t  q1 [$];
  int    ev_l1 [S], ev_h1 [S];
  int    gaps1 = 0, first1 = -1, last1 = -1, cyc = 0;

  transpose_reg #(.S(S), .P(1)) dut1 (
    .clk, .rst_n, .in_valid(v1), .in_tag(t1), .lo(lo1), .hi(hi1),
    .out_valid(ov1), .out_tag(ot1), .ev(ev1), .od(od1));

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    ent_t e;
    v1 = 1'b0; t1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < NR; y++) begin
      @(negedge clk);
      v1 = 1'b1;
      t1 = '0; t1.row = 16'(y);
      for (int k = 0; k < S; k++) begin
        lo1[k] = coef_t'($urandom_range(0, 60000)) - coef_t'(30000);
        hi1[k] = coef_t'($urandom_range(0, 60000)) - coef_t'(30000);
      end
      if (y % 2 == 0) begin
        for (int k = 0; k < S; k++) begin ev_l1[k] = int'(lo1[k]); ev_h1[k] = int'(hi1[k]); end
      end else begin
        for (int k = 0; k < S; k++) begin e.ev[k] = ev_l1[k]; e.od[k] = int'(lo1[k]); end
        e.m = y / 2; e.seg = 0; e.hi = 1'b0;
        q1.push_back(e);
        for (int k = 0; k < S; k++) begin e.ev[k] = ev_h1[k]; e.od[k] = int'(hi1[k]); end
        e.hi = 1'b1;
        q1.push_back(e);
      end
    end
    @(negedge clk);
    v1 = 1'b0;
  end

  always @(negedge clk) if (rst_n && ov1) begin
    ent_t e;
    if (q1.size() == 0) chk(1'b0, "P1 unexpected output");
    else begin
      e = q1.pop_front();
      for (int k = 0; k < S; k++) chk(int'(ev1[k]) == e.ev[k] && int'(od1[k]) == e.od[k], "P1 data");
      chk(int'(ot1.row) == e.m && ot1.hi == e.hi && ot1.seg == 8'(e.seg), "P1 tag");
    end
    if (first1 < 0) first1 = cyc;
    else if (cyc != last1 + 1) gaps1++;
    last1 = cyc;
    done1++;
  end

  // ---------------- P = 2, with idle cycles ----------------
  logic  v2, ov2;
  tag_t  t2, ot2;
  coef_t lo2 [S];
  coef_t hi2 [S];
  coef_t ev2 [S];
  coef_t od2 [S];
  ent_t  q2 [$];
  int    ev_l2 [2][S], ev_h2 [2][S];

  transpose_reg #(.S(S), .P(2)) dut2 (
    .clk, .rst_n, .in_valid(v2), .in_tag(t2), .lo(lo2), .hi(hi2),
    .out_valid(ov2), .out_tag(ot2), .ev(ev2), .od(od2));

  initial begin
    ent_t e;
    v2 = 1'b0; t2 = '0;
    repeat (3) @(negedge clk);
    for (int y = 0; y < NR; y++)
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        v2 = 1'b0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        v2 = 1'b1;
        t2 = '0; t2.row = 16'(y); t2.seg = 8'(s);
        for (int k = 0; k < S; k++) begin
          lo2[k] = coef_t'($urandom_range(0, 60000)) - coef_t'(30000);
          hi2[k] = coef_t'($urandom_range(0, 60000)) - coef_t'(30000);
        end
        if (y % 2 == 0) begin
          for (int k = 0; k < S; k++) begin ev_l2[s][k] = int'(lo2[k]); ev_h2[s][k] = int'(hi2[k]); end
        end else begin
          for (int k = 0; k < S; k++) begin e.ev[k] = ev_l2[s][k]; e.od[k] = int'(lo2[k]); end
          e.m = y / 2; e.seg = s; e.hi = 1'b0;
          q2.push_back(e);
          for (int k = 0; k < S; k++) begin e.ev[k] = ev_h2[s][k]; e.od[k] = int'(hi2[k]); end
          e.hi = 1'b1;
          q2.push_back(e);
        end
      end
    @(negedge clk);
    v2 = 1'b0;
  end

  always @(negedge clk) if (rst_n && ov2) begin
    ent_t e;
    if (q2.size() == 0) chk(1'b0, "P2 unexpected output");
    else begin
      e = q2.pop_front();
      for (int k = 0; k < S; k++) chk(int'(ev2[k]) == e.ev[k] && int'(od2[k]) == e.od[k], "P2 data");
      chk(int'(ot2.row) == e.m && ot2.hi == e.hi && int'(ot2.seg) == e.seg, "P2 tag");
    end
    done2++;
  end

  initial begin
    wait (done1 == NR && done2 == 2 * NR);
    repeat (5) @(posedge clk);
    // continuous input: one row per cycle in, one entry per cycle out
    chk(gaps1 == 0, "P1 output rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
