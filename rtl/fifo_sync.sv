// Small synchronous FIFO with valid/ready on both sides.
//
// DEPTH entries of WIDTH bits in a register array with read and write
// pointers one bit wider than the address, so full and empty are told apart.
// A word written while the FIFO is not full is readable from the next cycle;
// rd_data shows the oldest word whenever rd_valid is high. Reset empties it.
module fifo_sync #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic [AW:0]      used;

  assign used     = wptr - rptr;
  assign wr_ready = (used != (AW+1)'(DEPTH));
  assign rd_valid = (used != '0);
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_valid && wr_ready) wptr <= wptr + 1'b1;
      if (rd_valid && rd_ready) rptr <= rptr + 1'b1;
    end
  end

endmodule
