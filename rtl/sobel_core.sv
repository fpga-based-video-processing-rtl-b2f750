// Sobel edge detector core.
//
// Applies the two 3x3 Sobel kernels to a window (row 0 = top line):
//   Gx = [-1 0 1; -2 0 2; -1 0 1]    Gy = [1 2 1; 0 0 0; -1 -2 -1]
// and outputs |Gx| + |Gy|, clipped to 255. The two kernels share one pass over
// the window, as the document combines the two filters in one unit.
//
// Timing: two register stages, both enabled by en. Stage 1 holds Gx and Gy,
// stage 2 the clipped sum; edge_o belongs to the window presented two en
// cycles earlier. The kernels follow the document; reading "the responses are
// added" as a sum of magnitudes, the clipping and the pipelining are this
// design's own.
module sobel_core
  import videoware_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  pixel_t win [3][3],
  output pixel_t edge_o
);

  logic signed [11:0] gx, gy, gx_q, gy_q;
  logic        [11:0] mag;

  function automatic logic signed [11:0] px(input pixel_t p);
    return signed'({4'b0, p});
  endfunction

  always_comb begin
    gx = (px(win[0][2]) + 12'sd2 * px(win[1][2]) + px(win[2][2]))
       - (px(win[0][0]) + 12'sd2 * px(win[1][0]) + px(win[2][0]));
    gy = (px(win[0][0]) + 12'sd2 * px(win[0][1]) + px(win[0][2]))
       - (px(win[2][0]) + 12'sd2 * px(win[2][1]) + px(win[2][2]));
  end

  assign mag = 12'((gx_q < 0) ? -gx_q : gx_q) + 12'((gy_q < 0) ? -gy_q : gy_q);

  always_ff @(posedge clk) begin
    if (en) begin
      gx_q   <= gx;
      gy_q   <= gy;
      edge_o <= (mag > 12'd255) ? 8'd255 : mag[7:0];
    end
  end

endmodule
