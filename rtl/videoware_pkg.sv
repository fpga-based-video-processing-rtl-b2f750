// Shared types and constants of the line-based feature-extraction components.
//
// A pixel is an 8-bit grey level. Every component moves a stream of pixels in
// raster order; next to each window centre travels a small tag saying whether
// the slot holds a pixel at all, whether that pixel lies on the image border
// (its window is not fully inside the image) and whether it is the last pixel
// of the frame. The SUSAN mask is the 37-cell circular 7x7 mask: rows of
// 3, 5, 7, 7, 7, 5 and 3 cells.
package videoware_pkg;

  typedef logic [7:0] pixel_t;

  // Which detector a component holds.
  typedef enum logic [1:0] {
    ALG_SOBEL        = 2'd0,
    ALG_SUSAN_EDGE   = 2'd1,
    ALG_SUSAN_CORNER = 2'd2
  } algo_e;

  typedef struct packed {
    logic valid;   // slot holds a window centre
    logic border;  // window reaches outside the image
    logic last;    // last pixel of the frame
  } tag_t;

  localparam int unsigned SOBEL_K = 3;
  localparam int unsigned SUSAN_K = 7;
  localparam int unsigned SUSAN_R = 3;

  // Half width of each row of the circular SUSAN mask.
  function automatic int unsigned susan_half(input int unsigned row);
    case (row)
      0, 6:    return 1;
      1, 5:    return 2;
      default: return 3;
    endcase
  endfunction

  // True for the 36 cells of the circular mask other than the centre.
  function automatic bit susan_in_mask(input int unsigned row, input int unsigned col);
    int d;
    d = (col > SUSAN_R) ? int'(col - SUSAN_R) : int'(SUSAN_R - col);
    return (d <= int'(susan_half(row))) && !(row == SUSAN_R && col == SUSAN_R);
  endfunction

endpackage
