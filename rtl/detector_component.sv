// Line-based feature-extraction component: data buffer plus detector.
//
// One uniform structure serves all three detectors. Pixels enter in raster
// order, line by line; a line_window keeps the last K-1 lines and forms a KxK
// window around every pixel (K = 3 for Sobel, 7 for SUSAN); the detector core
// chosen by ALGO turns each window into one output pixel; results leave in
// the same raster order as the input, one output pixel per input pixel.
// Pixels whose window reaches outside the image are output as 0.
//
// Flow control is a single global stall: the pipeline moves (adv) whenever
// the output register is empty or being taken (out_ready). Input is accepted
// when the pipeline moves and the buffer is not flushing the last lines of a
// frame. out_last marks the final pixel of each frame.
//
// Latency, with no stalls: an output pixel appears R lines + R pixels + the
// core depth + 1 cycles after its input pixel (R = 1 and depth 2 for Sobel,
// R = 3 and depth 3 for SUSAN). Throughput is one pixel per clock, with a gap
// of R*W+R cycles at the end of each frame while the buffer flushes.
//
// The buffer-then-detector structure and line-based order follow the
// document; the handshake, the flush and the border value are this design's
// own.
module detector_component
  import videoware_pkg::*;
#(
  parameter algo_e       ALGO      = ALG_SOBEL,
  parameter int unsigned MAX_WIDTH = 640,
  parameter int unsigned BT        = 20,
  parameter int unsigned G_EDGE    = 9,
  parameter int unsigned G_CORNER  = 18,
  localparam int unsigned K   = (ALGO == ALG_SOBEL) ? SOBEL_K : SUSAN_K,
  localparam int unsigned LAT = (ALGO == ALG_SOBEL) ? 2 : 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_width,
  input  logic [15:0] cfg_height,
  input  logic        in_valid,
  output logic        in_ready,
  input  pixel_t      in_pixel,
  output logic        out_valid,
  input  logic        out_ready,
  output pixel_t      out_pixel,
  output logic        out_last
);

  logic   adv;
  pixel_t win [K][K];
  tag_t   tag;
  tag_t   tag_pipe [LAT];
  pixel_t core_px;

  assign adv = !out_valid || out_ready;

  line_window #(.K(K), .MAX_WIDTH(MAX_WIDTH)) u_buf (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_width  (cfg_width),
    .cfg_height (cfg_height),
    .adv        (adv),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_pixel   (in_pixel),
    .win        (win),
    .tag        (tag)
  );

  if (ALGO == ALG_SOBEL) begin : g_sobel
    sobel_core u_core (.clk(clk), .en(adv), .win(win), .edge_o(core_px));
  end else if (ALGO == ALG_SUSAN_EDGE) begin : g_susan_edge
    susan_edge_core #(.BT(BT), .G_EDGE(G_EDGE)) u_core (
      .clk(clk), .en(adv), .win(win), .edge_o(core_px));
  end else begin : g_susan_corner
    susan_corner_core #(.BT(BT), .G_CORNER(G_CORNER)) u_core (
      .clk(clk), .en(adv), .win(win), .corner_o(core_px));
  end

  // The tag travels beside the core's pipeline stages.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) tag_pipe[i] <= '0;
    end else if (adv) begin
      tag_pipe[0] <= tag;
      for (int i = 1; i < int'(LAT); i++) tag_pipe[i] <= tag_pipe[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pixel <= '0;
      out_last  <= 1'b0;
    end else if (adv) begin
      out_valid <= tag_pipe[LAT-1].valid;
      out_pixel <= tag_pipe[LAT-1].border ? '0 : core_px;
      out_last  <= tag_pipe[LAT-1].last;
    end
  end

  // A result that is offered but not taken stays, unchanged, on the output.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_pixel) && $stable(out_last))
    else $error("output changed while held");

  // No input is taken while the pipeline is stalled.
  a_no_take_in_stall: assert property (@(posedge clk) disable iff (!rst_n)
    !adv |-> !in_ready)
    else $error("input accepted during a stall");

endmodule
