// sobel_grad_tb: applies random and extreme 3x3 windows to sobel_grad and
// compares Gx and Gy with the masks evaluated in integer arithmetic.
module sobel_grad_tb;
  import sobel_pkg::*;
  import tb_ref_pkg::*;
  win_t win;
  grad_t gx, gy;
  int checks = 0, failures = 0;

  sobel_grad dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[$], rgx, rgy, rmag;
    for (int t = 0; t < 2000; t++) begin
      img.delete();
      for (int i = 0; i < 9; i++) begin
        case (t % 4)
          0: img.push_back($urandom_range(255));
          1: img.push_back(($urandom_range(1) != 0) ? 255 : 0);
          2: img.push_back((i % 3 == 0) ? 255 : 0);   // left column bright
          default: img.push_back((i >= 6) ? 255 : 0); // bottom row bright
        endcase
      end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] = pix_t'(img[r * 3 + c]);
      #1;
      sobel_ref(img, 3, 1, 1, rgx, rgy, rmag);
      checks += 2;
      if (int'(gx) != rgx) begin failures++; $display("gx %0d expected %0d", gx, rgx); end
      if (int'(gy) != rgy) begin failures++; $display("gy %0d expected %0d", gy, rgy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
