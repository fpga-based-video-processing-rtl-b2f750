// Self-checking testbench for line_window (K = 7, the SUSAN buffer).
//
// Two frames of a random 11 x 9 image are pushed with random gaps on the
// input and random stalls (adv low). Every valid tag is checked against the
// raster position the model expects next: the border flag, the last flag and,
// for inside pixels, all 49 window cells against the image. The test also
// counts one tag per pixel per frame and checks that the buffer stalls the
// input while it flushes the last lines.
module tb_line_window;
  import videoware_pkg::*;
  import vw_ref_pkg::*;

  localparam int K = 7, R = 3, W = 11, H = 9, FRAMES = 2;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   adv, in_valid, in_ready;
  pixel_t in_pixel;
  pixel_t win [K][K];
  tag_t   tag;
  int     img [FRAMES][H][W];
  int     checks = 0, failures = 0;
  int     ocx = 0, ocy = 0, oframe = 0, tags = 0, flush_stalls = 0;

  line_window #(.K(K), .MAX_WIDTH(16)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_width(16'(W)), .cfg_height(16'(H)),
    .adv(adv), .in_valid(in_valid), .in_ready(in_ready), .in_pixel(in_pixel),
    .win(win), .tag(tag));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at frame %0d (%0d,%0d) dut c=(%0d,%0d) tag=%b", what, oframe, ocx, ocy, dut.cx, dut.cy, tag);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: check every valid tag, once, in the cycle it is taken (adv).
  always @(posedge clk) begin
    if (rst_n && adv && tag.valid && oframe < FRAMES) begin
      bit border;
      border = ocx < R || ocy < R || ocx + R >= W || ocy + R >= H;
      check(tag.border == border, "border flag");
      check(tag.last == (ocx == W - 1 && ocy == H - 1), "last flag");
      if (!border) begin
        bit ok;
        ok = 1;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            if (int'(win[r][c]) != img[oframe][ocy-R+r][ocx-R+c]) ok = 0;
        check(ok, "window contents");
      end
      tags++;
      if (ocx == W - 1) begin
        ocx = 0;
        if (ocy == H - 1) begin ocy = 0; oframe++; end
        else ocy++;
      end else ocx++;
    end
  end

  // Random stalls; count cycles where the flush holds the input off.
  always @(negedge clk) begin
    adv = ($urandom_range(4) != 0);
    if (rst_n && adv && !in_ready) flush_stalls++;
  end

  initial begin
    in_valid = 1'b0;
    in_pixel = '0;
    foreach (img[f, y, x]) img[f][y][x] = $urandom_range(255);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          #1;
          while ($urandom_range(3) == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
            #1;
          end
          in_valid = 1'b1;
          in_pixel = pixel_t'(img[f][y][x]);
          // in_ready is stable from here to the edge
          forever begin
            bit acc;
            acc = in_ready;
            @(posedge clk);
            if (acc) break;
            @(negedge clk);
            #1;
          end
        end
    @(negedge clk);
    in_valid = 1'b0;
    wait (oframe == FRAMES);
    repeat (5) @(posedge clk);
    check(tags == FRAMES * W * H, "one tag per pixel");
    check(flush_stalls > 0, "flush stalled the input");
    $display("tags=%0d flush_stalls=%0d", tags, flush_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
