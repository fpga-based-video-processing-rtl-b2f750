// Self-checking testbench for detector_component, all three detectors.
//
// One instance per detector (Sobel, SUSAN edge, SUSAN corner) filters the
// same 24 x 18 test image twice. Frame 0 runs with no gaps and no output
// back-pressure and checks the exact timing: the last output pixel must be
// taken W*H + R*W + R + LAT + 1 cycles after the first input pixel.
// Frame 1 runs with random input gaps and random out_ready. Every output
// pixel is compared with the reference model, out_last must mark exactly the
// last pixel of each frame, and each instance must have stalled its output
// and its input (flush) at least once.
module tb_detector_component;
  import videoware_pkg::*;
  import vw_ref_pkg::*;

  localparam int W = 24, H = 18, FRAMES = 2;
  localparam int BT = 20, GE = 9, GC = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  img_t img;
  int   checks = 0, failures = 0, done = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar a = 0; a < 3; a++) begin : g_dut
    localparam int R = (a == 0) ? 1 : 3;
    localparam int LAT = (a == 0) ? 2 : 3;
    // edges from the first accepted pixel to the last output appearing
    // edges from the one accepting the first pixel to the one taking the last
    // result: W*H input pushes, R*W+R flush pushes, the tag register, LAT core
    // stages and the output register
    localparam int LAT_TOTAL = W * H + R * W + R + LAT + 1;

    logic   in_valid, in_ready, out_valid, out_ready, out_last;
    pixel_t in_pixel, out_pixel;
    int     ox = 0, oy = 0, oframe = 0;
    int     out_stalls = 0, flush_stalls = 0, nonzero = 0;
    int     t_first = 0, t_last = 0, edges = 0;
    bit     backpressure = 0;

    detector_component #(.ALGO(algo_e'(a)), .MAX_WIDTH(32), .BT(BT), .G_EDGE(GE),
                         .G_CORNER(GC)) dut (
      .clk(clk), .rst_n(rst_n), .cfg_width(16'(W)), .cfg_height(16'(H)),
      .in_valid(in_valid), .in_ready(in_ready), .in_pixel(in_pixel),
      .out_valid(out_valid), .out_ready(out_ready), .out_pixel(out_pixel),
      .out_last(out_last));


    always @(negedge clk) begin
      out_ready = backpressure ? ($urandom_range(2) != 0) : 1'b1;
      if (out_valid && !out_ready) out_stalls++;
      if (rst_n && dut.adv && !in_ready) flush_stalls++;
    end

    always @(posedge clk) begin
      edges++;
      if (rst_n && in_valid && in_ready && oframe == 0 && t_first == 0) t_first = edges;
      if (rst_n && out_valid && out_ready && oframe < FRAMES) begin
        int e;
        e = expected(a, img, W, H, ox, oy, BT, GE, GC);
        check(int'(out_pixel) == e,
              $sformatf("algo %0d pixel (%0d,%0d) got %0d expected %0d", a, ox, oy, out_pixel, e));
        check(out_last == (ox == W - 1 && oy == H - 1), $sformatf("algo %0d out_last", a));
        if (out_pixel != 0) nonzero++;
        if (out_last && oframe == 0) t_last = edges;
        if (ox == W - 1) begin
          ox = 0;
          if (oy == H - 1) begin oy = 0; oframe++; end
          else oy++;
        end else ox++;
      end
    end

    initial begin
      in_valid = 1'b0;
      in_pixel = '0;
      wait (rst_n);
      for (int f = 0; f < FRAMES; f++) begin
        backpressure = (f == 1);
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            @(negedge clk);
            #1;
            while (f == 1 && $urandom_range(4) == 0) begin
              in_valid = 1'b0;
              @(negedge clk);
              #1;
            end
            in_valid = 1'b1;
            in_pixel = pixel_t'(img[y][x]);
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
        wait (oframe == f + 1);
      end
      check(t_last - t_first == LAT_TOTAL,
            $sformatf("algo %0d frame time %0d expected %0d", a, t_last - t_first, LAT_TOTAL));
      check(out_stalls > 0, $sformatf("algo %0d output stall seen", a));
      check(flush_stalls > 0, $sformatf("algo %0d flush stall seen", a));
      check(nonzero > 0, $sformatf("algo %0d produced a response", a));
      $display("algo %0d: frame time %0d, out stalls %0d, flush stalls %0d, nonzero %0d",
               a, t_last - t_first, out_stalls, flush_stalls, nonzero);
      done++;
    end
  end

  initial begin
    make_image(img, W, H, 7);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
