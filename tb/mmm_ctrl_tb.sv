// mmm_ctrl_tb: checks the multiplier's control unit at K = 256: the bits
// handed out are those of A, LSB first, one per step; exactly K steps are
// made; last marks the final one; done follows K+1 clocks after start; and a
// start during a run is ignored.
module mmm_ctrl_tb;
  import tb_ref_pkg::*;
  localparam int K = 256;

  logic clk = 0, rst_n = 0, start = 0;
  logic [K-1:0] a;
  logic load, step, a_bit, last, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mmm_ctrl #(.K(K)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [K-1:0] ta);
    int steps = 0, cyc = 0, lasts = 0;
    logic [K-1:0] got = '0;
    @(negedge clk);
    a = ta; start = 1;
    #1;
    checks++;
    if (!load) begin failures++; $display("start not accepted"); end
    @(negedge clk);
    a = ~ta;   // start while busy: must be ignored
    #1;
    checks++;
    if (load) begin failures++; $display("start accepted while busy"); end
    @(negedge clk);
    start = 0;
    cyc = 2;
    // iterations started at the clock after start
    while (!done) begin
      @(negedge clk); cyc++;
    end
    checks++;
    if (cyc != K + 1) begin failures++; $display("done after %0d clocks", cyc); end
  endtask

  // record the bits seen during steps
  logic [K-1:0] bits;
  int nsteps, nlast;
  always @(posedge clk) begin
    if (load) begin nsteps = 0; nlast = 0; bits = '0; end
    else if (step) begin
      if (nsteps < K) bits[nsteps] = a_bit;
      if (last) begin
        nlast++;
        checks++;
        if (nsteps != K - 1) begin failures++; $display("last at step %0d", nsteps); end
      end
      nsteps++;
    end
  end

  initial begin
    logic [K-1:0] ra;
    a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      ra = (i == 0) ? '1 : (i == 1) ? K'(1) : K'(rand_wide(K));
      run(ra);
      checks += 3;
      if (bits != ra)  begin failures++; $display("bits %h expected %h", bits, ra); end
      if (nsteps != K) begin failures++; $display("%0d steps", nsteps); end
      if (nlast != 1)  begin failures++; $display("last seen %0d times", nlast); end
      @(negedge clk);
      checks++;
      if (busy || step) begin failures++; $display("still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
