// tb_dpp: drives a DPP with independent random inputs every cycle, including
// the stage-aligned partial-result inputs, and checks the partial outputs at
// t+1, t+2, t+3 and the low/high outputs at t+4 against the four lifting
// equations, which also checks the one-unit-per-cycle throughput and latency.
module tb_dpp;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NT = 3000;

  logic  clk = 1'b0;
  coef_t xe0, xo, xe1, p_d1, p_s1, p_d2, po_d1, po_s1, po_d2, lo, hi;
  int    checks = 0, failures = 0;
  int    vxe0[NT+8], vxo[NT+8], vxe1[NT+8], vpd1[NT+8], vps1[NT+8], vpd2[NT+8];

  always #5 clk = ~clk;

  dpp dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int d1, s1, d2, s2;
    foreach (vxe0[i]) begin
      vxe0[i] = $urandom_range(0, 255); vxo[i] = $urandom_range(0, 255);
      vxe1[i] = $urandom_range(0, 255);
      vpd1[i] = int'($urandom_range(0, 1000)) - 500;
      vps1[i] = int'($urandom_range(0, 2000)) - 1000;
      vpd2[i] = int'($urandom_range(0, 1000)) - 500;
    end
    for (int t = 0; t < NT + 4; t++) begin
      xe0 = coef_t'(vxe0[t]); xo = coef_t'(vxo[t]); xe1 = coef_t'(vxe1[t]);
      p_d1 = coef_t'(vpd1[t]); p_s1 = coef_t'(vps1[t]); p_d2 = coef_t'(vpd2[t]);
      @(posedge clk);
      #1;
      // item t-k is in stage k+1 now
      if (t >= 0) begin
        d1 = ref_cell(C1, vxo[t], vxe0[t], vxe1[t]);
        chk("po_d1", int'(po_d1), d1);
      end
      if (t >= 1) begin
        d1 = ref_cell(C1, vxo[t-1], vxe0[t-1], vxe1[t-1]);
        s1 = ref_cell(C2, vxe0[t-1], vpd1[t], d1);
        chk("po_s1", int'(po_s1), s1);
      end
      if (t >= 2) begin
        d1 = ref_cell(C1, vxo[t-2], vxe0[t-2], vxe1[t-2]);
        s1 = ref_cell(C2, vxe0[t-2], vpd1[t-1], d1);
        d2 = ref_cell(C3, vpd1[t-1], vps1[t], s1);
        chk("po_d2", int'(po_d2), d2);
      end
      if (t >= 3) begin
        d1 = ref_cell(C1, vxo[t-3], vxe0[t-3], vxe1[t-3]);
        s1 = ref_cell(C2, vxe0[t-3], vpd1[t-2], d1);
        d2 = ref_cell(C3, vpd1[t-2], vps1[t-1], s1);
        s2 = ref_cell(C4, vps1[t-1], vpd2[t], d2);
        chk("lo", int'(lo), s2);
        chk("hi", int'(hi), d2);
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
