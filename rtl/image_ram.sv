// image_ram: the frame store that holds the input picture.
//
// A simple dual-port memory: one write port, used to load the picture (one
// pixel per clock, raster order or any order), and one read port with a
// registered output, used by the edge detector to fetch a pixel per clock.
// Read data appear one clock after the address. Reading and writing the same
// address in one clock returns the old contents. Holding the picture in RAM
// before processing follows the source design; the two-port organisation and
// the one-cycle read latency are this design's choices. The contents are not
// reset.
module image_ram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [AW-1:0]               waddr,
  input  sobel_pkg::pix_t             wdata,
  input  logic [AW-1:0]               raddr,
  output sobel_pkg::pix_t             rdata
);
  sobel_pkg::pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
