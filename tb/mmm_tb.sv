// mmm_tb: self-checking test of the Montgomery multiplier at K = 256.
// Drives corner operands (zero, one, all ones, B = M-1, small and large
// moduli) and random ones, checks every result for P*2^K == A*B (mod M) and
// P < 2M, checks that done arrives exactly K+1 clocks after start, that a
// start while busy is ignored, and that all four multiplexer choices
// (0, M, B, B+M) are taken.
module mmm_tb;
  import tb_ref_pkg::*;
  localparam int K = 256;

  logic clk = 0, rst_n = 0, start = 0;
  logic [K-1:0] a, b, m;
  logic busy, done;
  logic [K:0] p;
  int checks = 0, failures = 0;
  int sel_seen[4];

  always #5 clk = ~clk;

  mmm #(.K(K)) dut (.*);

  // Count which of the four addends (0, M, B, B+M) the recurrence needs,
  // from a software run of the bit-serial algorithm.
  function automatic void count_sel(input logic [K-1:0] ta, tb_, tm);
    wide_t z = '0;
    for (int i = 0; i < K; i++) begin
      logic q = z[0] ^ (ta[i] & tb_[0]);
      sel_seen[{ta[i], q}]++;
      z = (z + (ta[i] ? wide_t'(tb_) : '0) + (q ? wide_t'(tm) : '0)) >> 1;
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [K-1:0] ta, tb_, tm);
    int cyc = 0;
    count_sel(ta, tb_, tm);
    @(negedge clk);
    a = ta; b = tb_; m = tm; start = 1;
    @(negedge clk);
    start = 0;
    // a second start while busy must not disturb the operation
    a = ~ta; b = '0; m = '1; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 2;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != K + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, K + 1);
    end
    checks++;
    if (!mont_ok(wide_t'(ta), wide_t'(tb_), wide_t'(tm), wide_t'(p), K)) begin
      failures++;
      $display("wrong product a=%h b=%h m=%h p=%h", ta, tb_, tm, p);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after done"); end
  endtask

  initial begin
    logic [K-1:0] ra, rb, rm;
    a = '0; b = '0; m = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // corner cases
    run('0, 5, 13);
    run(1, 1, 13);
    run('1, 12, 13);
    run('1, '1 - 1, '1);           // M = 2^K-1, B = M-1
    run(7, 2, 3);
    for (int i = 0; i < 40; i++) begin
      rm = K'(rand_wide(K)) | 1;
      if (i % 4 == 0) rm[K-1] = 1'b1;
      rb = K'(rand_wide(K) % wide_t'(rm));
      ra = K'(rand_wide(K));
      run(ra, rb, rm);
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("mux choice %0d never taken", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
