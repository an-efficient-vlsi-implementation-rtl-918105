// edge_mmm_top_tb: end-to-end test of the whole design at its default size
// (256x256 picture, 256-bit multiplier), with no parameter overridden.
// It loads a generated picture (a bright disc, a dark rectangle, a
// horizontal ramp and low-level noise), runs the edge detector over it twice
// with different thresholds, and meanwhile keeps the Montgomery multiplier
// busy with random products. Every streamed pixel is checked against an
// integer Sobel model and every product for P*2^K == A*B (mod M), P < 2M.
// It counts how often each mechanism of the design happened and fails if
// one never did: picture load, frame scan, edge and non-edge pixels, frame
// restart with a new threshold, a start refused while busy (both units),
// both units running at once, and each of the four multiplier addends
// (0, M, B, B+M).
module edge_mmm_top_tb;
  import sobel_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 256, H = 256, K = 256, AW = 16, XW = 8, YW = 8;

  logic clk = 0, rst_n = 0;
  logic img_wr_en = 0, sobel_start = 0, mmm_start = 0;
  logic [AW-1:0] img_wr_addr = '0;
  pix_t img_wr_data = '0;
  mag_t sobel_thresh = '0;
  logic sobel_busy, sobel_done, edge_valid, edge_bit, mmm_busy, mmm_done;
  logic [XW-1:0] edge_x;
  logic [YW-1:0] edge_y;
  mag_t edge_mag;
  logic [K-1:0] mmm_a = '0, mmm_b = '0, mmm_m = '1;
  logic [K:0] mmm_p;

  int img[$];
  int checks = 0, failures = 0;
  int nout = 0, nedge = 0, nflat = 0, nframes = 0, nloads = 0, nproducts = 0;
  int nrefused_sobel = 0, nrefused_mmm = 0, noverlap = 0;
  int sel_seen[4];
  bit frames_done = 0;

  always #5 clk = ~clk;

  edge_mmm_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- edge stream checker ----------------
  always @(negedge clk) begin
    if (rst_n && edge_valid) begin
      int gx, gy, m, x, y;
      x = int'(edge_x); y = int'(edge_y);
      nout++;
      sobel_ref(img, W, x, y, gx, gy, m);
      checks++;
      if (int'(edge_mag) != m || edge_bit != (m > int'(sobel_thresh))) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d) mag %0d edge %b, expected %0d", x, y, edge_mag, edge_bit, m);
      end
      if (edge_bit) nedge++; else nflat++;
    end
    if (sobel_busy && mmm_busy) noverlap++;
  end

  // ---------------- multiplier driver ----------------
  function automatic void count_sel(input logic [K-1:0] ta, tb_, tm);
    wide_t z = '0;
    for (int i = 0; i < K; i++) begin
      logic q = z[0] ^ (ta[i] & tb_[0]);
      sel_seen[{ta[i], q}]++;
      z = (z + (ta[i] ? wide_t'(tb_) : '0) + (q ? wide_t'(tm) : '0)) >> 1;
    end
  endfunction

  initial begin
    logic [K-1:0] ra, rb, rm;
    @(posedge rst_n);
    while (!frames_done) begin
      rm = K'(rand_wide(K)) | 1;
      rm[K-1] = 1'b1;
      rb = K'(rand_wide(K) % wide_t'(rm));
      ra = K'(rand_wide(K));
      count_sel(ra, rb, rm);
      @(negedge clk);
      mmm_a = ra; mmm_b = rb; mmm_m = rm; mmm_start = 1;
      @(negedge clk);
      mmm_a = ~ra; mmm_b = '0;
      @(negedge clk);
      mmm_start = 0;
      nrefused_mmm++;   // the second start pulse above arrived while busy
      while (!mmm_done) @(negedge clk);
      nproducts++;
      checks++;
      if (!mont_ok(wide_t'(ra), wide_t'(rb), wide_t'(rm), wide_t'(mmm_p), K)) begin
        failures++; $display("wrong product %h", mmm_p);
      end
      repeat ($urandom_range(20)) @(negedge clk);
    end
  end

  // ---------------- picture and edge detector driver ----------------
  task automatic frame(input int th);
    int cyc = 0;
    nout = 0;
    @(negedge clk);
    sobel_thresh = mag_t'(th); sobel_start = 1;
    @(negedge clk);
    sobel_start = 0;
    cyc = 1;
    repeat (100) begin @(negedge clk); cyc++; end
    sobel_start = 1;
    @(negedge clk); cyc++;
    sobel_start = 0;
    nrefused_sobel++;
    while (!sobel_done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != W * H + 4) begin failures++; $display("frame took %0d clocks", cyc); end
    @(negedge clk);
    if (nout != (W - 2) * (H - 2)) begin failures++; $display("%0d pixels out", nout); end
    nframes++;
  endtask

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int v, dx = x - 90, dy = y - 100;
        if (dx * dx + dy * dy < 50 * 50) v = 220 + $urandom_range(20);
        else if (x >= 150 && x < 230 && y >= 40 && y < 120) v = 10 + $urandom_range(5);
        else if (y >= 180) v = x / 2;
        else v = 120 + $urandom_range(6);
        img.push_back(v);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      img_wr_en = 1; img_wr_addr = AW'(i); img_wr_data = pix_t'(img[i]);
      nloads++;
    end
    @(negedge clk);
    img_wr_en = 0;
    frame(200);
    frame(40);
    frames_done = 1;
    while (mmm_busy) @(negedge clk);
    repeat (5) @(negedge clk);

    $display("mechanisms: loads=%0d frames=%0d edge=%0d flat=%0d products=%0d refused_sobel=%0d refused_mmm=%0d overlap=%0d sel=%0d/%0d/%0d/%0d",
             nloads, nframes, nedge, nflat, nproducts, nrefused_sobel, nrefused_mmm, noverlap,
             sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3]);
    checks += 12;
    if (nloads != W * H)    begin failures++; $display("picture not loaded"); end
    if (nframes != 2)       begin failures++; $display("frames missing"); end
    if (nedge == 0)         begin failures++; $display("no edge pixel"); end
    if (nflat == 0)         begin failures++; $display("no flat pixel"); end
    if (nproducts == 0)     begin failures++; $display("no product"); end
    if (nrefused_sobel == 0) begin failures++; $display("no refused frame start"); end
    if (nrefused_mmm == 0)  begin failures++; $display("no refused multiplier start"); end
    if (noverlap == 0)      begin failures++; $display("units never ran together"); end
    for (int s = 0; s < 4; s++)
      if (sel_seen[s] == 0) begin failures++; $display("addend %0d never used", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
