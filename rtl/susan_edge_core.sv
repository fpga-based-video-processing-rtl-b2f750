// SUSAN edge detector core.
//
// Counts, over the circular mask, the pixels that differ from the centre by
// more than BT (susan_usan), then applies the second, geometric threshold: the
// edge response is count - G_EDGE when count > G_EDGE, otherwise 0. The more
// pixels differ from the centre, the stronger the edge. G_EDGE = 9 different
// pixels is the classic SUSAN edge limit (a similar area below 3/4 of the 37
// cells). The response, at most 27, is multiplied by 8 and clipped to 255 so
// that it can be shown as an image.
//
// Timing: three register stages enabled by en (compare, count, rule); edge_o
// belongs to the window presented three en cycles earlier. The two thresholds
// follow the document; their values, the scaling and the pipelining are this
// design's own.
module susan_edge_core
  import videoware_pkg::*;
#(
  parameter int unsigned BT     = 20,
  parameter int unsigned G_EDGE = 9
) (
  input  logic   clk,
  input  logic   en,
  input  pixel_t win [7][7],
  output pixel_t edge_o
);

  logic [5:0] count;
  logic [8:0] resp;

  susan_usan #(.BT(BT)) u_usan (
    .clk   (clk),
    .en    (en),
    .win   (win),
    .count (count)
  );

  assign resp = (32'(count) > G_EDGE) ? 9'({count - 6'(G_EDGE), 3'b000}) : 9'd0;

  always_ff @(posedge clk) begin
    if (en) edge_o <= (resp > 9'd255) ? 8'd255 : resp[7:0];
  end

endmodule
