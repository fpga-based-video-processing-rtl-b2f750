// Self-checking testbench for host_link.
//
// Drives the cable pins through pc_cable_bfm and checks:
//  - transactions are ignored before the pushbutton selects data mode;
//  - each press toggles data mode;
//  - written bytes reach the pixel port in order with the right values, the
//    write status bit reports a free holding register;
//  - a write while the pixel port is blocked sets the sticky overrun flag and
//    reports "not free" in the status bit;
//  - reads return FIFO results in order with status 1, and status 0 with
//    data 0 when the FIFO is empty;
//  - the result FIFO refuses data (s_ready low) when it holds FIFO_DEPTH.
module tb_host_link;
  import videoware_pkg::*;

  localparam int DEPTH = 4;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   tck, tms, tdi, tdo, btn, data_mode, overrun;
  logic   m_valid, m_ready, s_valid, s_ready;
  pixel_t m_data, s_data;
  int     checks = 0, failures = 0;
  pixel_t got_q [$];

  host_link #(.FIFO_DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .pc_tck(tck), .pc_tms(tms), .pc_tdi(tdi), .pc_tdo(tdo),
    .btn(btn), .data_mode(data_mode), .overrun(overrun),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data));

  pc_cable_bfm #(.HALF(4)) pc (.clk(clk), .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo), .btn(btn));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && m_valid && m_ready) got_q.push_back(m_data);

  // push one result into the FIFO side
  task automatic put_result(input pixel_t d, output bit taken);
    @(negedge clk);
    s_valid = 1'b1;
    s_data  = d;
    taken   = s_ready;
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  initial begin
    logic   st, v;
    logic [7:0] d;
    bit     taken;
    pixel_t sent [$];
    @(negedge clk) m_ready = 1'b1;
    s_valid = 1'b0;
    s_data  = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // configuration mode: nothing happens
    pc.write_byte(8'h5A, st);
    repeat (10) @(posedge clk);
    check(got_q.size() == 0 && !data_mode, "write ignored outside data mode");

    pc.press();
    check(data_mode, "press enters data mode");

    // writes
    for (int i = 0; i < 20; i++) begin
      pixel_t b;
      b = pixel_t'($urandom_range(255));
      sent.push_back(b);
      pc.write_byte(b, st);
      check(st == 1'b1, "write status free");
    end
    repeat (10) @(posedge clk);
    check(got_q.size() == 20, $sformatf("20 bytes delivered, got %0d", got_q.size()));
    foreach (sent[i]) check(i < got_q.size() && got_q[i] == sent[i], "written byte value");
    check(!overrun, "no overrun yet");

    // blocked pixel port: second write is lost
    @(negedge clk) m_ready = 1'b0;
    pc.write_byte(8'h11, st);
    check(st == 1'b1, "first blocked write finds register free");
    pc.write_byte(8'h22, st);
    check(st == 1'b0, "second blocked write sees register busy");
    repeat (10) @(posedge clk);
    check(overrun, "overrun flag set");
    @(negedge clk) m_ready = 1'b1;
    repeat (4) @(posedge clk);
    check(got_q[$] == 8'h11, "held byte delivered after the block");

    // reads
    pc.read_byte(v, d);
    check(v == 1'b0 && d == 8'h00, "empty read gives status 0");
    for (int i = 0; i < DEPTH; i++) begin
      put_result(pixel_t'(8'hA0 + i), taken);
      check(taken, "FIFO takes result");
    end
    put_result(8'hFF, taken);
    check(!taken && !s_ready, "full FIFO refuses a result");
    for (int i = 0; i < DEPTH; i++) begin
      pc.read_byte(v, d);
      check(v == 1'b1 && d == 8'(8'hA0 + i), $sformatf("read %0d got %0b/%h", i, v, d));
    end
    pc.read_byte(v, d);
    check(v == 1'b0, "FIFO empty again");

    pc.press();
    check(!data_mode, "second press leaves data mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
