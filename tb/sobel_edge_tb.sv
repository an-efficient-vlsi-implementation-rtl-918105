// sobel_edge_tb: loads a 16x12 picture (random noise, a bright rectangle
// and a ramp) into sobel_edge, runs two frames with different thresholds and
// checks every streamed pixel (coordinates, magnitude, edge bit) against an
// integer model of the Sobel operator, that each interior pixel comes out
// exactly once, that done arrives in clock cycle W*H+4 when start
// was high in cycle 0, that busy falls
// with it, and that a start while busy is ignored.
module sobel_edge_tb;
  import sobel_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 16, H = 12, AW = 8, XW = 4, YW = 4;

  logic clk = 0, rst_n = 0, wr_en = 0, start = 0;
  logic [AW-1:0] wr_addr = '0;
  pix_t wr_data = '0;
  mag_t thresh = '0;
  logic busy, done, out_valid, out_edge;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;
  mag_t out_mag;
  int img[$];
  int seen[W * H];
  int checks = 0, failures = 0, nout = 0, nedge = 0;

  always #5 clk = ~clk;
  sobel_edge #(.IMG_W(W), .IMG_H(H), .AW(AW), .XW(XW), .YW(YW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int gx, gy, m, x, y;
      x = int'(out_x); y = int'(out_y);
      nout++;
      checks++;
      if (x < 1 || x > W - 2 || y < 1 || y > H - 2) begin
        failures++; $display("border pixel (%0d,%0d) produced", x, y);
      end else begin
        seen[y * W + x]++;
        sobel_ref(img, W, x, y, gx, gy, m);
        checks += 2;
        if (int'(out_mag) != m) begin failures++; $display("(%0d,%0d) mag %0d expected %0d", x, y, out_mag, m); end
        if (out_edge != (m > int'(thresh))) begin failures++; $display("(%0d,%0d) edge bit wrong", x, y); end
        if (out_edge) nedge++;
      end
    end
  end

  task automatic frame(input int th);
    int cyc;
    foreach (seen[i]) seen[i] = 0;
    nout = 0; nedge = 0;
    @(negedge clk);
    thresh = mag_t'(th); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    repeat (5) begin @(negedge clk); cyc++; end
    start = 1;   // ignored: busy
    @(negedge clk); cyc++;
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != W * H + 4) begin failures++; $display("done after %0d clocks, expected %0d", cyc, W * H + 4); end
    @(negedge clk);
    checks += 3;
    if (busy) begin failures++; $display("busy after done"); end
    if (nout != (W - 2) * (H - 2)) begin failures++; $display("%0d outputs", nout); end
    if (nedge == 0 || nedge == nout) begin failures++; $display("edge map degenerate: %0d of %0d", nedge, nout); end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        checks++;
        if (seen[y * W + x] != 1) begin failures++; $display("(%0d,%0d) seen %0d times", x, y, seen[y * W + x]); end
      end
    repeat (10) @(negedge clk);
    checks++;
    if (nout != (W - 2) * (H - 2)) begin failures++; $display("outputs after done"); end
  endtask

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (x >= 4 && x < 10 && y >= 3 && y < 8) v = 200 + $urandom_range(55);
        else if (y >= 9) v = x * 16;
        else v = $urandom_range(40);
        img.push_back(v);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = pix_t'(img[i]);
    end
    @(negedge clk);
    wr_en = 0;
    frame(300);
    frame(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
