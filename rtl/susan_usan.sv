// SUSAN comparison and count over the 37-cell circular mask.
//
// For a 7x7 window (row 0 = top line) it compares each of the 36 mask cells
// around the centre with the centre pixel and counts the cells whose absolute
// brightness difference exceeds BT ("different" pixels). The mask has rows of
// 3, 5, 7, 7, 7, 5 and 3 cells; corner cells of the 7x7 square are ignored.
// The count is the initial SUSAN response that the edge and corner rules then
// threshold a second time.
//
// Timing: two register stages enabled by en: the 36 compare bits, then the
// count (0..36). count belongs to the window presented two en cycles earlier.
// The mask and the compare-and-count rule follow the document; BT = 20 is the
// customary SUSAN brightness threshold and, like the pipelining, this design's
// own choice.
module susan_usan
  import videoware_pkg::*;
#(
  parameter int unsigned BT = 20
) (
  input  logic       clk,
  input  logic       en,
  input  pixel_t     win [7][7],
  output logic [5:0] count
);

  logic [6:0][6:0] diff, diff_q;
  logic [5:0]      sum;

  always_comb begin
    for (int r = 0; r < 7; r++) begin
      for (int c = 0; c < 7; c++) begin
        logic [8:0] d;
        d = (win[r][c] > win[3][3]) ? 9'(win[r][c]) - 9'(win[3][3])
                                    : 9'(win[3][3]) - 9'(win[r][c]);
        diff[r][c] = susan_in_mask(r, c) && (d > 9'(BT));
      end
    end
  end

  always_comb begin
    sum = '0;
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++)
        sum = sum + 6'(diff_q[r][c]);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      diff_q <= diff;
      count  <= sum;
    end
  end

endmodule
