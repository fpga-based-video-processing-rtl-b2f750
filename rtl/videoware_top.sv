// FPGA side of the PC-to-FPGA test harness for the low-level feature
// extractors: Sobel edges, SUSAN edges and SUSAN corners.
//
// The PC sends an image, pixel by pixel in raster order, over the cable that
// also configures the FPGA (host_link, switched to data use by the board's
// pushbutton). The pixels go to one of three line-based components
// (detector_component), each a data buffer followed by a detector; the output
// image, in the same raster order, goes back into the link's result FIFO and
// is read by the PC over the same cable. algo_sel picks the component:
// 0 Sobel, 1 SUSAN edge, 2 SUSAN corner (3 is treated as 2). Change algo_sel,
// cfg_width and cfg_height only between frames, when every result of the
// previous frame has been read.
//
// Ports: the cable pins pc_tck/pc_tms/pc_tdi/pc_tdo, the pushbutton btn, two
// status lights (data mode, pixel lost), a frame-done pulse and the frame size. All logic runs on
// clk with a synchronous active-low reset.
//
// The flow (image in over the parallel cable, filtered line by line, image
// back over the same cable) follows the document. Holding all three
// detectors at once behind a selector is this design's own choice: the
// document loads one detector per FPGA configuration.
module videoware_top
  import videoware_pkg::*;
#(
  parameter int unsigned MAX_WIDTH       = 640,
  parameter int unsigned BT              = 20,
  parameter int unsigned G_EDGE          = 9,
  parameter int unsigned G_CORNER        = 18,
  parameter int unsigned LINK_FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_width,
  input  logic [15:0] cfg_height,
  input  logic [1:0]  algo_sel,
  input  logic        pc_tck,
  input  logic        pc_tms,
  input  logic        pc_tdi,
  output logic        pc_tdo,
  input  logic        btn,
  output logic        led_data_mode,
  output logic        led_overrun,
  output logic        frame_done
);

  localparam int unsigned NALG = 3;

  logic   px_valid, px_ready;
  pixel_t px_data;
  logic   res_valid, res_ready;
  pixel_t res_data;
  logic   [1:0] sel;

  logic   c_in_valid  [NALG];
  logic   c_in_ready  [NALG];
  logic   c_out_valid [NALG];
  logic   c_out_ready [NALG];
  pixel_t c_out_pixel [NALG];
  logic   c_out_last  [NALG];

  assign sel = (algo_sel > 2'd2) ? 2'd2 : algo_sel;

  host_link #(.FIFO_DEPTH(LINK_FIFO_DEPTH)) u_link (
    .clk       (clk),
    .rst_n     (rst_n),
    .pc_tck    (pc_tck),
    .pc_tms    (pc_tms),
    .pc_tdi    (pc_tdi),
    .pc_tdo    (pc_tdo),
    .btn       (btn),
    .data_mode (led_data_mode),
    .overrun   (led_overrun),
    .m_valid   (px_valid),
    .m_ready   (px_ready),
    .m_data    (px_data),
    .s_valid   (res_valid),
    .s_ready   (res_ready),
    .s_data    (res_data)
  );

  for (genvar a = 0; a < int'(NALG); a++) begin : g_comp
    assign c_in_valid[a]  = px_valid && (sel == 2'(a));
    assign c_out_ready[a] = res_ready && (sel == 2'(a));
    detector_component #(
      .ALGO      (algo_e'(a)),
      .MAX_WIDTH (MAX_WIDTH),
      .BT        (BT),
      .G_EDGE    (G_EDGE),
      .G_CORNER  (G_CORNER)
    ) u_comp (
      .clk        (clk),
      .rst_n      (rst_n),
      .cfg_width  (cfg_width),
      .cfg_height (cfg_height),
      .in_valid   (c_in_valid[a]),
      .in_ready   (c_in_ready[a]),
      .in_pixel   (px_data),
      .out_valid  (c_out_valid[a]),
      .out_ready  (c_out_ready[a]),
      .out_pixel  (c_out_pixel[a]),
      .out_last   (c_out_last[a])
    );
  end

  assign px_ready  = c_in_ready[sel];
  assign res_valid = c_out_valid[sel];
  assign res_data  = c_out_pixel[sel];
  // One-cycle pulse when the last result of a frame enters the link FIFO.
  assign frame_done = res_valid && res_ready && c_out_last[sel];

endmodule
