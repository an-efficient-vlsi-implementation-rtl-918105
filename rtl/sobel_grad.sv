// sobel_grad: applies the two 3x3 Sobel masks to a pixel window.
//
// Combinational. With win[r][c] (r=0 upper row, c=0 left column):
//   Gx mask  1 0 -1 / 2 0 -2 / 1 0 -1  (vertical edges, gradient along x)
//   Gy mask -1 -2 -1 / 0 0 0 / 1 2 1   (horizontal edges, gradient along y)
// The masks and their signs are those of the source design. Multiplication
// by 2 is a shift, so the unit is adders and subtractors only. The results
// are signed, GRAD_W bits, and never overflow.
module sobel_grad (
  input  sobel_pkg::win_t  win,
  output sobel_pkg::grad_t gx,
  output sobel_pkg::grad_t gy
);
  import sobel_pkg::*;

  function automatic grad_t ext(input pix_t p);
    return grad_t'({1'b0, p});
  endfunction

  always_comb begin
    gx = (ext(win[0][0]) + (ext(win[1][0]) <<< 1) + ext(win[2][0]))
       - (ext(win[0][2]) + (ext(win[1][2]) <<< 1) + ext(win[2][2]));
    gy = (ext(win[2][0]) + (ext(win[2][1]) <<< 1) + ext(win[2][2]))
       - (ext(win[0][0]) + (ext(win[0][1]) <<< 1) + ext(win[0][2]));
  end
endmodule
