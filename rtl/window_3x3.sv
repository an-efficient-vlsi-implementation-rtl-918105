// window_3x3: builds the 3x3 neighbourhood of a raster pixel stream.
//
// Pixels arrive one per clock when in_valid is high, row after row, IMG_W
// per row. Two line buffers of IMG_W pixels keep the previous two rows; the
// window is a 3x3 register array that shifts one column left for every input
// pixel and takes a new right column made of the incoming pixel and the two
// pixels above it read from the line buffers. Once the newest pixel (x, y)
// has x >= 2 and y >= 2 the window is complete and centred on (x-1, y-1):
// win_valid is then high for one clock with ctr_x/ctr_y giving that centre.
// All outputs are registered, one clock after the input pixel. clear (or
// reset) returns the position counters to the start of a frame. The line
// buffers themselves are not reset; they are only read after being written.
// Extracting an image window follows the source design; the line-buffer
// structure is this design's choice.
module window_3x3 #(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  sobel_pkg::pix_t   in_pix,
  output logic              win_valid,
  output sobel_pkg::win_t   win,
  output logic [XW-1:0]     ctr_x,
  output logic [YW-1:0]     ctr_y
);
  import sobel_pkg::*;

  pix_t lb0 [IMG_W];   // row y-1
  pix_t lb1 [IMG_W];   // row y-2
  logic [XW-1:0] x;
  logic [YW-1:0] y;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb0[x] <= in_pix;
      lb1[x] <= lb0[x];
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb1[x];
      win[1][2] <= lb0[x];
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
      ctr_x     <= '0;
      ctr_y     <= '0;
    end else if (clear) begin
      x         <= '0;
      y         <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (x >= XW'(2)) && (y >= YW'(2));
      if (in_valid) begin
        ctr_x <= x - XW'(1);
        ctr_y <= y - YW'(1);
        if (x == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= (y == YW'(IMG_H - 1)) ? '0 : y + YW'(1);
        end else begin
          x <= x + XW'(1);
        end
      end
    end
  end
endmodule
