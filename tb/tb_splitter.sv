// tb_splitter: random groups of W = 8 values arriving every 2 to 4 cycles;
// the output must be the first half in the arrival cycle and the second half
// in the next cycle, and nothing else.
module tb_splitter;
  import dwt_pkg::*;

  localparam int W = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, out_valid;
  coef_t din [W];
  coef_t dout [W/2];
  int    checks = 0, failures = 0, nout = 0;
  int    expq [$];

  always #5 clk = ~clk;

  splitter #(.W(W)) dut (.*);

  initial begin
    in_valid = 1'b0;
    foreach (din[i]) din[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 200; g++) begin
      @(negedge clk);
      in_valid = 1'b1;
      foreach (din[i]) begin
        din[i] = coef_t'($urandom_range(0, 100000));
        expq.push_back(int'(din[i]));
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (nout != 400 || expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample just before the clock edge
  always @(posedge clk) if (rst_n && out_valid) begin
    nout++;
    for (int i = 0; i < W/2; i++) begin
      checks++;
      if (expq.size() == 0 || int'(dout[i]) != expq.pop_front()) begin
        failures++;
        if (failures < 10) $display("output %0d lane %0d wrong at %0t", nout, i, $time);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
