// Self-checking testbench for susan_corner_core.
//
// Random windows (drawn around a random centre so that both small and large
// differences occur) are applied every cycle while en toggles at random. A
// model pipeline of depth 3, advanced by the same en, holds the values the
// reference model predicts; the DUT output is compared with its last stage
// after every enabled cycle, which also checks the latency of 3 en cycles.
module tb_susan_corner_core;
  import videoware_pkg::*;
  import vw_ref_pkg::*;

  localparam int K = 7;
  localparam int LAT = 3;

  logic   clk = 1'b0;
  logic   en;
  pixel_t win [K][K];
  pixel_t dut_o;
  img_t   img;
  int     exp_pipe [LAT];
  bit     vld_pipe [LAT];
  int     checks = 0, failures = 0;
  int     cycles = 0;

  susan_corner_core #(.BT(20), .G_CORNER(18)) dut (.clk(clk), .en(en), .win(win), .corner_o(dut_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    foreach (vld_pipe[i]) vld_pipe[i] = 0;
    for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) win[r][c] = '0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      int centre, spread;
      @(negedge clk);
      centre = $urandom_range(255);
      spread = (n % 3 == 0) ? 255 : $urandom_range(60);
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          int v;
          v = centre + $urandom_range(2 * spread) - spread;
          if (n % 7 == 0 && c < K / 2) v = centre + 100;  // step edge
          if (v < 0) v = 0;
          if (v > 255) v = 255;
          win[r][c] = pixel_t'(v);
          img[r][c] = v;
        end
      en = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) begin
        for (int i = LAT - 1; i > 0; i--) begin
          exp_pipe[i] = exp_pipe[i-1];
          vld_pipe[i] = vld_pipe[i-1];
        end
        exp_pipe[0] = (susan_count_at(img, 3, 3, 20) > 18) ? 255 : 0;
        vld_pipe[0] = 1;
        #1;
        if (vld_pipe[LAT-1]) begin
          checks++;
          if (int'(dut_o) != exp_pipe[LAT-1]) begin
            failures++;
            if (failures < 10) $display("mismatch: got %0d expected %0d", dut_o, exp_pipe[LAT-1]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
