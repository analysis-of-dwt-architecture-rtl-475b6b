// tb_scaling_unit: random coefficient pairs for both column kinds; checks
// LL/LH (sel_hi = 0) and HL/HH (sel_hi = 1) against the scaling constants,
// one cycle after the inputs.
module tb_scaling_unit;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic  clk = 1'b0;
  logic  sel_hi;
  coef_t lo_in, hi_in, lo_out, hi_out;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaling_unit dut (.*);

  initial begin
    int el, eh;
    for (int i = 0; i < 3000; i++) begin
      sel_hi = $urandom_range(0, 1) == 1;
      lo_in  = coef_t'(int'($urandom_range(0, 400000)) - 200000);
      hi_in  = coef_t'(int'($urandom_range(0, 400000)) - 200000);
      el = scale(sel_hi ? K_HL : K_LL, lo_in);
      eh = scale(sel_hi ? K_HH : K_LH, hi_in);
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(lo_out) != el || int'(hi_out) != eh) begin
        failures++;
        if (failures < 10) $display("sel %0d in %0d/%0d: got %0d/%0d exp %0d/%0d",
                                    sel_hi, lo_in, hi_in, lo_out, hi_out, el, eh);
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
