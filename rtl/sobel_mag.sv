// sobel_mag: gradient magnitude and edge decision.
//
// Combinational. The true magnitude sqrt(Gx^2 + Gy^2) is replaced by the
// approximation |Gx| + |Gy|, which needs two absolute values and one adder
// and no multiplier or square root; the source design says only that
// approximations replace the complex operations, so the choice of |Gx|+|Gy|
// is this design's. A pixel is an edge when the magnitude is strictly
// greater than the threshold input.
module sobel_mag (
  input  sobel_pkg::grad_t gx,
  input  sobel_pkg::grad_t gy,
  input  sobel_pkg::mag_t  thresh,
  output sobel_pkg::mag_t  mag,
  output logic             edge_px
);
  import sobel_pkg::*;

  mag_t ax, ay;

  always_comb begin
    ax      = gx[GRAD_W-1] ? mag_t'(-gx) : mag_t'(gx);
    ay      = gy[GRAD_W-1] ? mag_t'(-gy) : mag_t'(gy);
    mag     = ax + ay;
    edge_px = (mag > thresh);
  end
endmodule
