// Serial host link over the cable that also configures the FPGA.
//
// The board's pushbutton switches the cable between configuration use and
// data use: each press (a rising edge of btn after synchronisation) toggles
// data_mode. In data mode the PC bit-bangs transactions of nine rising edges
// of pc_tck:
//   edge 0     pc_tms is sampled: 1 = write a pixel, 0 = read a result.
//              pc_tdo then shows a status bit: for a write, 1 if the pixel
//              holding register is free; for a read, 1 if a result is
//              returned (the result FIFO was not empty).
//   edges 1-8  write: pc_tdi is shifted in, most significant bit first.
//              read:  pc_tdo shows the result, most significant bit first,
//              changing after each edge (0 when the status bit was 0).
// A written pixel goes to a one-entry holding register, offered to the image
// pipeline on m_valid/m_ready. A pixel written while the register is still
// full is dropped and sets the sticky overrun flag. Results from the pipeline
// enter a FIFO of FIFO_DEPTH entries; when it is full, s_ready is low and the
// pipeline stalls. A read takes one FIFO entry if there is one.
//
// pc_tck, pc_tms, pc_tdi and btn are asynchronous and pass through two
// flip-flops; the system clock must run several times faster than pc_tck, and
// the PC should change pc_tms/pc_tdi while pc_tck is low and read pc_tdo
// before the next rising edge. Leaving data mode abandons a transaction.
//
// That the cable doubles as a data link switched by the pushbutton, with
// pixels sent and results returned over it, follows the document; the bit
// protocol, the FIFO and the flags are this design's own.
module host_link
  import videoware_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pc_tck,
  input  logic   pc_tms,
  input  logic   pc_tdi,
  output logic   pc_tdo,
  input  logic   btn,
  output logic   data_mode,
  output logic   overrun,
  output logic   m_valid,
  input  logic   m_ready,
  output pixel_t m_data,
  input  logic   s_valid,
  output logic   s_ready,
  input  pixel_t s_data
);

  typedef enum logic [1:0] {IDLE, WRITE, READ} xfer_e;

  logic [3:0] sync1, sync2;        // {btn, tck, tms, tdi}
  logic       btn_q, tck_q;
  logic       btn_rise, tck_rise;
  logic       s_tms, s_tdi;
  xfer_e      xfer;
  logic [3:0] nbit;                // data bits left in the transaction
  pixel_t     shreg;
  logic       fifo_valid, fifo_pop;
  pixel_t     fifo_data;

  always_ff @(posedge clk) begin
    sync1 <= {btn, pc_tck, pc_tms, pc_tdi};
    sync2 <= sync1;
    if (!rst_n) begin
      btn_q <= 1'b0;
      tck_q <= 1'b0;
    end else begin
      btn_q <= sync2[3];
      tck_q <= sync2[2];
    end
  end

  assign btn_rise = sync2[3] && !btn_q;
  assign tck_rise = sync2[2] && !tck_q;
  assign s_tms    = sync2[1];
  assign s_tdi    = sync2[0];

  fifo_sync #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (s_valid),
    .wr_ready (s_ready),
    .wr_data  (s_data),
    .rd_valid (fifo_valid),
    .rd_ready (fifo_pop),
    .rd_data  (fifo_data)
  );

  assign fifo_pop = data_mode && tck_rise && xfer == IDLE && !s_tms && fifo_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_mode <= 1'b0;
      overrun   <= 1'b0;
      xfer      <= IDLE;
      nbit      <= '0;
      shreg     <= '0;
      pc_tdo    <= 1'b0;
      m_valid   <= 1'b0;
      m_data    <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (btn_rise) begin
        data_mode <= !data_mode;
        xfer      <= IDLE;
        pc_tdo    <= 1'b0;
      end else if (data_mode && tck_rise) begin
        unique case (xfer)
          IDLE: begin
            nbit <= 4'd8;
            if (s_tms) begin
              xfer   <= WRITE;
              pc_tdo <= !m_valid || m_ready;
            end else begin
              xfer   <= READ;
              pc_tdo <= fifo_valid;
              shreg  <= fifo_valid ? fifo_data : '0;
            end
          end
          WRITE: begin
            shreg <= {shreg[6:0], s_tdi};
            nbit  <= nbit - 4'd1;
            if (nbit == 4'd1) begin
              xfer <= IDLE;
              if (m_valid && !m_ready) begin
                overrun <= 1'b1;
              end else begin
                m_valid <= 1'b1;
                m_data  <= {shreg[6:0], s_tdi};
              end
            end
          end
          READ: begin
            pc_tdo <= shreg[7];
            shreg  <= {shreg[6:0], 1'b0};
            nbit   <= nbit - 4'd1;
            if (nbit == 4'd1) xfer <= IDLE;
          end
          default: xfer <= IDLE;
        endcase
      end
    end
  end

  // A pixel offered to the image pipeline stays until it is taken.
  a_m_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data))
    else $error("pixel changed before it was taken");

endmodule
