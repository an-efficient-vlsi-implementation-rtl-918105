// image_ram_tb: writes random pixels to a small image_ram, reads them back
// with the one-clock read latency, and checks that a read of the address
// being written returns the old contents.
module image_ram_tb;
  import sobel_pkg::*;
  localparam int DEPTH = 64, AW = 6;

  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pix_t wdata = '0, rdata;
  pix_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  image_ram #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = pix_t'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'((i * 37) % DEPTH);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[(i * 37) % DEPTH]) begin
        failures++; $display("addr %0d read %h expected %h", (i * 37) % DEPTH, rdata, ref_mem[(i * 37) % DEPTH]);
      end
    end
    // read during write of the same address returns the old value
    for (int i = 0; i < 8; i++) begin
      automatic int ad = $urandom_range(DEPTH - 1);
      raddr = AW'(ad); waddr = AW'(ad); we = 1; wdata = ~ref_mem[ad];
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== ref_mem[ad]) begin failures++; $display("read-during-write not old data"); end
      ref_mem[ad] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[ad]) begin failures++; $display("new data not stored"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
