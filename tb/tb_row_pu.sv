// tb_row_pu: a Row-PU of S = 4 DPPs transforms one long random sequence fed as
// R consecutive segments of 2S samples, one per cycle; the partial results of
// the last DPP are handed back to the first DPP one cycle later (zero for the
// first segment). Every output lane is compared with the 1-D reference
// transform of the whole sequence, at latency 4.
module tb_row_pu;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int S = 4;
  localparam int R = 12;
  localparam int L = 2 * S * R;

  logic  clk = 1'b0;
  coef_t x [2*S];
  coef_t xe_in, p_d1, p_s1, p_d2, po_d1, po_s1, po_d2;
  coef_t lo [S];
  coef_t hi [S];
  coef_t r_d1, r_s1, r_d2;
  int    cyc = 0;
  int    checks = 0, failures = 0;
  arr_t  seq, elo, ehi;

  always #5 clk = ~clk;

  row_pu #(.S(S)) dut (.*);

  always_ff @(posedge clk) begin
    cyc  <= cyc + 1;
    r_d1 <= po_d1;
    r_s1 <= po_s1;
    r_d2 <= po_d2;
  end

  always_comb begin
    for (int i = 0; i < 2*S; i++) x[i] = cyc < R ? coef_t'(seq[2*S*cyc + i]) : '0;
    xe_in = (cyc == 0 || cyc >= R) ? '0 : coef_t'(seq[2*S*cyc - 1]);
    p_d1  = cyc == 1 ? '0 : r_d1;
    p_s1  = cyc == 2 ? '0 : r_s1;
    p_d2  = cyc == 3 ? '0 : r_d2;
  end

  initial begin
    int s;
    seq = new[L];
    foreach (seq[i]) seq[i] = (i % 9 < 4) ? int'($urandom_range(0, 255)) : 255 - i % 256;
    lift1d(seq, elo, ehi);
    @(negedge clk);
    while (cyc < R + 4) begin
      @(negedge clk);
      s = cyc - 4;       // segment whose outputs are visible now
      if (s >= 0 && s < R)
        for (int k = 0; k < S; k++) begin
          checks += 2;
          if (int'(lo[k]) != elo[S*s+k] || int'(hi[k]) != ehi[S*s+k]) begin
            failures++;
            if (failures < 10) $display("seg %0d lane %0d: got %0d/%0d exp %0d/%0d",
              s, k, lo[k], hi[k], elo[S*s+k], ehi[S*s+k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
