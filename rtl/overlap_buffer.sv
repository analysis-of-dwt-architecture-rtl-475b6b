// overlap_buffer: input buffer in front of level 1 that supplies the 7
// overlapped pixels.
//
// Each valid cycle brings one row of the current stripe (2S pixels). The buffer
// remembers the last 7 pixels of every row of the stripe and, with the same row
// of the next stripe, hands them out as the overlapped pixels o[0..6] (oldest
// column first). For the first stripe of an image the overlapped pixels are
// zero (zero padding left of the image). Pixels are converted from unsigned
// PIX_W bits to the signed internal width, so the bits of x and o above
// PIX_W are constant zero.
// The architecture places this buffer outside the DWT core and states only its
// function; this store of 7 x N pixels is the simplest way to provide it.
//
// Timing: registered, outputs one cycle after the input row.
module overlap_buffer
  import dwt_pkg::*;
#(
  parameter int S       = 16,
  parameter int N       = 512,        // image rows
  parameter int STRIPES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] pix [2*S],
  output logic             out_valid,
  output coef_t            x [2*S],
  output coef_t            o [NOVL]
);
  localparam int RW = $clog2(N);

  logic [PIX_W-1:0] mem [N][NOVL];
  logic [RW-1:0]    row;
  logic [15:0]      stripe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      stripe    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (row == RW'(N - 1)) begin
          row    <= '0;
          stripe <= (stripe == 16'(STRIPES - 1)) ? '0 : stripe + 1'b1;
        end else begin
          row <= row + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < 2*S; i++) x[i] <= coef_t'({1'b0, pix[i]});
      for (int i = 0; i < NOVL; i++) begin
        o[i]        <= stripe == '0 ? '0 : coef_t'({1'b0, mem[row][i]});
        mem[row][i] <= pix[2*S-NOVL+i];
      end
    end
  end

endmodule
