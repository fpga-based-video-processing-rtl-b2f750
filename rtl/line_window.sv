// Data buffer: line memories and a KxK window around every pixel.
//
// Pixels arrive one line after another (raster order). K-1 line memories hold
// the previous K-1 lines; each accepted pixel reads column x of every line
// memory, shifts the column one memory further down, and pushes the column of
// K pixels into a KxK window register (row 0 = oldest line, row K-1 = the line
// now arriving). The window centre therefore lags the input by R = (K-1)/2
// lines and R pixels, so output leaves in the same raster order as input.
//
// After the last pixel of a frame the buffer pushes R*W+R zero pixels on its
// own ("flush") so that the last R lines also get a window; in_ready is low
// while it does. Each push produces a tag for the window centre: valid once the
// centre is inside the frame, border when the window reaches outside the image,
// last for the final pixel. Pushes that do not complete a window give a tag with
// valid = 0.
//
// Interface: adv comes from downstream and says the pipeline may move this
// cycle. A push happens when adv is high and either a pixel is accepted
// (in_valid && in_ready) or the buffer is flushing. win and tag are registered
// and are new one cycle after the push; tag is cleared on an adv cycle without
// a push, so the downstream pipeline sees a bubble.
//
// The document gives the line-based flow and the number of stored lines (K-1:
// two for Sobel, six for the 7x7 SUSAN mask). The flush, the tags and the
// asynchronous line memories are this design's own.
module line_window
  import videoware_pkg::*;
#(
  parameter int unsigned K         = 3,
  parameter int unsigned MAX_WIDTH = 640,
  localparam int unsigned R  = (K - 1) / 2,
  localparam int unsigned AW = (MAX_WIDTH > 1) ? $clog2(MAX_WIDTH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] cfg_width,
  input  logic [15:0] cfg_height,
  input  logic        adv,
  input  logic        in_valid,
  output logic        in_ready,
  input  pixel_t      in_pixel,
  output pixel_t      win [K][K],
  output tag_t        tag
);

  logic [15:0] x, y;        // position of the next pushed pixel
  logic [15:0] cx, cy;      // position of the next window centre
  logic [31:0] fill;        // pushes seen before the first centre
  logic        flushing;
  logic        push;
  pixel_t      push_px;
  pixel_t      col [K];     // col[0] = arriving pixel, col[i] = i lines up
  logic [31:0] lag;
  logic        centre_ok, centre_last, centre_border;

  assign lag      = 32'(R) * 32'(cfg_width) + 32'(R);
  assign in_ready = adv && !flushing;
  assign push     = adv && (flushing || in_valid);
  assign push_px  = flushing ? '0 : in_pixel;

  // Line memories chained: memory i holds the line i+1 above the arriving one.
  assign col[0] = push_px;
  for (genvar i = 0; i < int'(K) - 1; i++) begin : g_line
    line_ram #(.DEPTH(MAX_WIDTH)) u_ram (
      .clk   (clk),
      .we    (push),
      .addr  (AW'(x)),
      .wdata (col[i]),
      .rdata (col[i+1])
    );
  end

  assign centre_ok     = (fill == lag);
  assign centre_last   = (cx == cfg_width - 16'd1) && (cy == cfg_height - 16'd1);
  assign centre_border = (32'(cx) < R) || (32'(cx) + R >= 32'(cfg_width)) ||
                         (32'(cy) < R) || (32'(cy) + R >= 32'(cfg_height));

  always_ff @(posedge clk) begin
    if (push) begin
      for (int r = 0; r < int'(K); r++) begin
        for (int c = 0; c < int'(K) - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col[K-1-r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0; y <= '0; cx <= '0; cy <= '0;
      fill <= '0; flushing <= 1'b0; tag <= '0;
    end else if (adv) begin
      tag <= '0;
      if (push) begin
        // position of the pushed pixel
        if (x == cfg_width - 16'd1) begin
          x <= '0;
          y <= y + 16'd1;
        end else begin
          x <= x + 16'd1;
        end
        if (!flushing && x == cfg_width - 16'd1 && y == cfg_height - 16'd1)
          flushing <= 1'b1;
        // window centre
        if (!centre_ok) begin
          fill <= fill + 32'd1;
        end else begin
          tag <= '{valid: 1'b1, border: centre_border, last: centre_last};
          if (centre_last) begin
            // frame complete: start the next one from scratch
            x <= '0; y <= '0; cx <= '0; cy <= '0;
            fill <= '0; flushing <= 1'b0;
          end else if (cx == cfg_width - 16'd1) begin
            cx <= '0;
            cy <= cy + 16'd1;
          end else begin
            cx <= cx + 16'd1;
          end
        end
      end
    end
  end

endmodule
