// One line memory of the data buffer.
//
// Holds one image line of up to DEPTH 8-bit pixels. The read is asynchronous,
// so in the cycle a column is written the old pixel of that column is still
// on rdata: the buffer reads the pixel one line up and overwrites it with the
// pixel below in the same cycle. The memory is not reset. Storing the lines
// inside the chip follows the document; the memory style is this design's own.
module line_ram
  import videoware_pkg::*;
#(
  parameter int unsigned DEPTH = 640,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  pixel_t        wdata,
  output pixel_t        rdata
);

  pixel_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
