// PC side of the cable link, for testbenches.
//
// Bit-bangs the host_link protocol: every transaction is nine rising edges
// of tck, each high and low phase HALF clock periods long (clk is the FPGA's
// clock, used only for timing). Edge 0 carries tms (1 write, 0 read) and is
// followed by a status bit on tdo; edges 1-8 carry a byte, most significant
// bit first, on tdi (write) or tdo (read). tdo is sampled at the end of each
// high phase. press() gives one pushbutton press.
module pc_cable_bfm #(
  parameter int HALF = 5
) (
  input  logic clk,
  output logic tck,
  output logic tms,
  output logic tdi,
  input  logic tdo,
  output logic btn
);

  initial begin
    tck = 1'b0;
    tms = 1'b0;
    tdi = 1'b0;
    btn = 1'b0;
  end

  task automatic wait_clk(input int n);
    repeat (n) @(posedge clk);
  endtask

  // one tck period; returns tdo as seen late in the high phase
  task automatic pulse(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    wait_clk(HALF);
    tck = 1'b1;
    wait_clk(HALF);
    tdo_v = tdo;
    tck = 1'b0;
  endtask

  task automatic press();
    btn = 1'b1;
    wait_clk(2 * HALF);
    btn = 1'b0;
    wait_clk(2 * HALF);
  endtask

  task automatic write_byte(input logic [7:0] data, output logic free);
    logic b;
    pulse(1'b1, 1'b0, free);
    for (int i = 7; i >= 0; i--) pulse(1'b0, data[i], b);
  endtask

  task automatic read_byte(output logic valid, output logic [7:0] data);
    pulse(1'b0, 1'b0, valid);
    for (int i = 7; i >= 0; i--) pulse(1'b0, 1'b0, data[i]);
  endtask

endmodule
