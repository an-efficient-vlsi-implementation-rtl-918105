// sobel_mag_tb: checks |Gx|+|Gy| and the edge decision (magnitude strictly
// above the threshold) for random and extreme gradients.
module sobel_mag_tb;
  import sobel_pkg::*;
  grad_t gx, gy;
  mag_t thresh, mag;
  logic edge_px;
  int checks = 0, failures = 0;

  sobel_mag dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, th, m;
    for (int t = 0; t < 3000; t++) begin
      x  = (t % 10 == 0) ? -1020 : (t % 10 == 1) ? 1020 : $urandom_range(2040) - 1020;
      y  = (t % 10 == 2) ? -1020 : $urandom_range(2040) - 1020;
      m  = (x < 0 ? -x : x) + (y < 0 ? -y : y);
      th = (t % 5 == 0) ? m : (t % 5 == 1) ? m - 1 : $urandom_range(2047);
      if (th < 0) th = 0;
      gx = grad_t'(x); gy = grad_t'(y); thresh = mag_t'(th);
      #1;
      checks += 2;
      if (int'(mag) != m) begin failures++; $display("mag %0d expected %0d", mag, m); end
      if (edge_px != (m > th)) begin failures++; $display("edge %b for mag %0d thresh %0d", edge_px, m, th); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
