// tb_overlap_buffer: a 6-row, 3-stripe random image (S = 4, width 24) fed row
// by row; for each output row checks the 2S stripe pixels and the 7
// overlapped pixels (the last 7 of the same row of the preceding stripe, zero
// in the first stripe), one cycle after the input. Two images are fed back to
// back to check that the stripe count wraps.
module tb_overlap_buffer;
  import dwt_pkg::*;

  localparam int S = 4, N = 6, R = 3, W = 2 * S * R;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             in_valid, out_valid;
  logic [PIX_W-1:0] pix [2*S];
  coef_t            x [2*S];
  coef_t            o [NOVL];
  int               checks = 0, failures = 0;
  int               img [2][N][W];

  always #5 clk = ~clk;

  overlap_buffer #(.S(S), .N(N), .STRIPES(R)) dut (.*);

  task automatic chk(int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("got %0d exp %0d at %0t", got, exp, $time);
    end
  endtask

  initial begin
    foreach (img[f, y, c]) img[f][y][c] = $urandom_range(0, 255);
    in_valid = 1'b0;
    foreach (pix[i]) pix[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < R; r++)
        for (int y = 0; y < N; y++) begin
          @(negedge clk);
          in_valid = 1'b1;
          for (int i = 0; i < 2*S; i++) pix[i] = PIX_W'(img[f][y][2*S*r + i]);
          @(posedge clk);
          #1;
          in_valid = 1'b0;
          chk(int'(out_valid), 1);
          for (int i = 0; i < 2*S; i++) chk(int'(x[i]), img[f][y][2*S*r + i]);
          for (int i = 0; i < NOVL; i++)
            chk(int'(o[i]), r == 0 ? 0 : img[f][y][2*S*r - NOVL + i]);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
