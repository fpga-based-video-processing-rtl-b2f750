// Self-checking testbench for line_ram.
//
// Writes random pixels to random columns and keeps a model array. Every
// cycle checks the asynchronous read against the model, including the cycle
// of a write to the same column, where the old pixel must still be read.
module tb_line_ram;
  import videoware_pkg::*;

  localparam int DEPTH = 40;

  logic   clk = 1'b0;
  logic   we;
  logic [5:0] addr;
  pixel_t wdata, rdata;
  int     model [DEPTH];
  int     checks = 0, failures = 0;

  line_ram #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every column first so that every later read is defined
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 6'(a); wdata = pixel_t'($urandom_range(255));
      model[a] = int'(wdata);
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      addr  = 6'($urandom_range(DEPTH - 1));
      wdata = pixel_t'($urandom_range(255));
      #1;
      checks++;
      if (int'(rdata) != model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %0d expected %0d", addr, rdata, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = int'(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
