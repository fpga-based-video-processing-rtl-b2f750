// End-to-end run of videoware_top through the cable pins, shared by the
// end-to-end testbenches, which choose the frame size.
//
// The PC model presses the pushbutton to enter data mode, then for each of
// the three detectors (algo_sel 0, 1, 2) sends a W x H test image one pixel
// at a time, reading back results after every write until the link reports
// none, and finally reads until the whole output image is back. Every result
// is compared with the reference model. The run counts how often each
// mechanism of the design occurred and fails if one never did: data-mode
// switch, detector switch, input held off while a buffer flushes the last
// lines, result FIFO full (pipeline stalled), empty read, border pixels,
// frame-done pulse. No pixel may be lost (overrun). The top keeps its default
// parameters; BT, GE and GC must equal them.
module videoware_e2e_run #(
  parameter int W = 16,
  parameter int H = 12
);
  import videoware_pkg::*;
  import vw_ref_pkg::*;

  localparam int BT = 20, GE = 9, GC = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] algo_sel;
  logic tck, tms, tdi, tdo, btn, led_data_mode, led_overrun, frame_done;
  img_t img;
  int   checks = 0, failures = 0;
  int   n_mode = 0, n_algo = 0, n_flush_stall = 0, n_fifo_full = 0;
  int   n_empty_read = 0, n_border = 0, n_frame_done = 0;

  videoware_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_width(16'(W)), .cfg_height(16'(H)),
    .algo_sel(algo_sel), .pc_tck(tck), .pc_tms(tms), .pc_tdi(tdi), .pc_tdo(tdo),
    .btn(btn), .led_data_mode(led_data_mode), .led_overrun(led_overrun),
    .frame_done(frame_done));

  pc_cable_bfm #(.HALF(3)) pc (.clk(clk), .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo), .btn(btn));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3 * (W * H + 64) * 400 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled inside the design
  always @(posedge clk) begin
    if (rst_n) begin
      if (!dut.px_ready && dut.res_ready) n_flush_stall++;  // input held off while the pipeline moves
      if (dut.res_valid && !dut.res_ready) n_fifo_full++;
      if (frame_done) n_frame_done++;
    end
  end

  int ox, oy, algo;

  task automatic take(input logic [7:0] d);
    int e;
    e = expected(algo, img, W, H, ox, oy, BT, GE, GC);
    check(int'(d) == e, $sformatf("algo %0d (%0d,%0d) got %0d expected %0d", algo, ox, oy, d, e));
    if (e == 0 && (ox < 3 || oy < 3 || ox + 3 >= W || oy + 3 >= H)) n_border++;
    if (ox == W - 1) begin ox = 0; oy++; end
    else ox++;
  endtask

  task automatic drain();
    logic v;
    logic [7:0] d;
    forever begin
      if (oy == H) break;
      pc.read_byte(v, d);
      if (!v) begin
        n_empty_read++;
        break;
      end
      take(d);
    end
  endtask

  initial begin
    logic st, v;
    logic [7:0] d;
    algo_sel = 2'd0;
    make_image(img, W, H, 11);
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    pc.press();
    check(led_data_mode, "data mode after press");
    if (led_data_mode) n_mode++;
    for (algo = 0; algo < 3; algo++) begin
      int done0;
      algo_sel = 2'(algo);
      n_algo++;
      ox = 0;
      oy = 0;
      done0 = n_frame_done;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          pc.write_byte(8'(img[y][x]), st);
          check(st, "pixel register free on write");
          drain();
        end
      while (oy < H) begin
        pc.read_byte(v, d);
        if (v) take(d);
        else n_empty_read++;
      end
      repeat (20) @(posedge clk);
      check(n_frame_done == done0 + 1, $sformatf("algo %0d one frame-done pulse", algo));
      pc.read_byte(v, d);
      check(!v, "nothing left after the frame");
    end
    check(!led_overrun, "no pixel lost");
    pc.press();
    check(!led_data_mode, "press leaves data mode");
    if (!led_data_mode) n_mode++;
    $display("mechanisms: mode switch %0d, detector switch %0d, flush stall %0d, FIFO full %0d,",
             n_mode, n_algo, n_flush_stall, n_fifo_full);
    $display("            empty read %0d, border pixels %0d, frame done %0d",
             n_empty_read, n_border, n_frame_done);
    check(n_mode == 2, "data mode switched in and out");
    check(n_algo == 3, "all detectors used");
    check(n_flush_stall > 0, "flush stall happened");
    check(n_fifo_full > 0, "result FIFO filled");
    check(n_empty_read > 0, "empty read happened");
    check(n_border > 0, "border pixels output");
    check(n_frame_done == 3, "three frame-done pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
