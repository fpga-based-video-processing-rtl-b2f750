// SUSAN corner detector core.
//
// Uses the same compare-and-count over the circular mask as the edge detector
// (susan_usan) but a different local rule: a pixel is marked as a corner
// (output 255) when more than G_CORNER of the 36 surrounding mask pixels
// differ from the centre, i.e. when the similar area is below half the mask;
// otherwise the output is 0. There is no centroid test and no non-maximum
// suppression, so pixels along strong edges can also be marked.
//
// Timing: three register stages enabled by en (compare, count, rule);
// corner_o belongs to the window presented three en cycles earlier. That the
// corner detector differs only in its local rule follows the document; the
// rule's threshold, the binary output and the pipelining are this design's own.
module susan_corner_core
  import videoware_pkg::*;
#(
  parameter int unsigned BT       = 20,
  parameter int unsigned G_CORNER = 18
) (
  input  logic   clk,
  input  logic   en,
  input  pixel_t win [7][7],
  output pixel_t corner_o
);

  logic [5:0] count;

  susan_usan #(.BT(BT)) u_usan (
    .clk   (clk),
    .en    (en),
    .win   (win),
    .count (count)
  );

  always_ff @(posedge clk) begin
    if (en) corner_o <= (32'(count) > G_CORNER) ? 8'd255 : 8'd0;
  end

endmodule
