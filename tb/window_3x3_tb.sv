// window_3x3_tb: streams three 9x7 frames, with random idle clocks between
// pixels, into window_3x3 and checks every window it reports against the
// frame: the 3x3 pixels, the centre coordinates, and that exactly
// (W-2)*(H-2) windows come out per frame, one clock after their last pixel.
module window_3x3_tb;
  import sobel_pkg::*;
  localparam int W = 9, H = 7, XW = 4, YW = 3;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  pix_t in_pix = '0;
  logic win_valid;
  win_t win;
  logic [XW-1:0] ctr_x;
  logic [YW-1:0] ctr_y;
  int img[$];
  int checks = 0, failures = 0, nwin = 0;
  int exp_x, exp_y;
  logic pend = 0, pend_q = 0;
  int exp_xq, exp_yq;

  always @(posedge clk) begin
    pend_q <= pend; exp_xq <= exp_x; exp_yq <= exp_y;
  end

  always #5 clk = ~clk;
  window_3x3 #(.IMG_W(W), .IMG_H(H), .XW(XW), .YW(YW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: a window is expected exactly one clock after a pixel that
  // completes it
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (win_valid !== pend_q) begin failures++; $display("win_valid %b expected %b", win_valid, pend_q); end
      if (win_valid && pend_q) begin
        nwin++;
        checks++;
        if (ctr_x != XW'(exp_xq) || ctr_y != YW'(exp_yq)) begin
          failures++; $display("centre (%0d,%0d) expected (%0d,%0d)", ctr_x, ctr_y, exp_xq, exp_yq);
        end
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (int'(win[r][c]) != img[(exp_yq - 1 + r) * W + exp_xq - 1 + c]) begin
              failures++; $display("win[%0d][%0d] wrong at (%0d,%0d)", r, c, exp_xq, exp_yq);
            end
          end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      img.delete();
      for (int i = 0; i < W * H; i++) img.push_back($urandom_range(255));
      nwin = 0;
      if (f == 2) begin clear = 1; @(negedge clk); clear = 0; end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(3) == 0) begin
            in_valid = 0; pend = 0; @(negedge clk);
          end
          in_valid = 1; in_pix = pix_t'(img[y * W + x]);
          pend = (x >= 2 && y >= 2); exp_x = x - 1; exp_y = y - 1;
          @(negedge clk);
          in_valid = 0; pend = 0;
        end
      @(negedge clk);
      checks++;
      if (nwin != (W - 2) * (H - 2)) begin failures++; $display("%0d windows", nwin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
