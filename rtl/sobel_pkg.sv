// sobel_pkg: types and widths shared by the Sobel edge-detection pipeline.
//
// Pixels are unsigned grey levels of PIX_W bits. A Sobel mask has weights
// -1/-2/-1 and 1/2/1, so one gradient lies in [-4*(2^PIX_W-1), 4*(2^PIX_W-1)]
// and needs PIX_W+3 bits signed. The magnitude approximation |Gx|+|Gy| never
// exceeds 8*(2^PIX_W-1) and fits PIX_W+3 bits unsigned. The 8-bit pixel is
// this design's choice; the source text only speaks of a grey-level (and then
// binarised) image.
package sobel_pkg;
  parameter int unsigned PIX_W  = 8;
  parameter int unsigned GRAD_W = PIX_W + 3;
  parameter int unsigned MAG_W  = PIX_W + 3;

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0]         mag_t;
  // 3x3 neighbourhood, win[r][c]: r=0 is the upper row, c=0 the left column.
  typedef logic [2:0][2:0][PIX_W-1:0] win_t;
endpackage
