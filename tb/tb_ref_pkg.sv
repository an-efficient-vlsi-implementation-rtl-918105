// tb_ref_pkg: reference arithmetic used by the testbenches, written
// independently of the RTL with plain integer arithmetic.
//   sobel_ref   : Gx, Gy, |Gx|+|Gy| of pixel (x, y) of an image held in a
//                 queue, row-major, using the two Sobel masks
//                 Gx = [1 0 -1; 2 0 -2; 1 0 -1], Gy = [-1 -2 -1; 0 0 0; 1 2 1].
//   mont_ok     : true when P*2^K == A*B (mod M) and P < 2M, the contract of
//                 a Montgomery product without final subtraction.
//   rand_wide   : a random value of up to 512 bits built from $urandom.
package tb_ref_pkg;
  typedef logic [1023:0] wide_t;

  function automatic void sobel_ref(input int img[$], input int w, input int x, input int y,
                                    output int gx, output int gy, output int mag);
    int p[3][3];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        p[r][c] = img[(y - 1 + r) * w + (x - 1 + c)];
    gx = (p[0][0] + 2 * p[1][0] + p[2][0]) - (p[0][2] + 2 * p[1][2] + p[2][2]);
    gy = (p[2][0] + 2 * p[2][1] + p[2][2]) - (p[0][0] + 2 * p[0][1] + p[0][2]);
    mag = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  function automatic wide_t rand_wide(input int bits);
    wide_t v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom;
    for (int i = bits; i < 1024; i++) v[i] = 1'b0;
    return v;
  endfunction

  function automatic bit mont_ok(input wide_t a, input wide_t b, input wide_t m,
                                 input wide_t p, input int k);
    wide_t lhs, rhs;
    if (p >= (m << 1)) return 1'b0;
    lhs = (p << k) % m;
    rhs = (a * b) % m;
    return lhs == rhs;
  endfunction
endpackage
