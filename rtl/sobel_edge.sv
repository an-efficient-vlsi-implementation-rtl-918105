// sobel_edge: pipelined Sobel edge detector working from an image RAM.
//
// The picture is first loaded through the write port (wr_en, wr_addr =
// y*IMG_W + x, wr_data) into image_ram. A start pulse then makes the scan
// controller read the whole frame in raster order, one pixel per clock, and
// push it through four register stages:
//   1. image_ram read          (pixel data)
//   2. window_3x3              (3x3 neighbourhood, line buffers)
//   3. sobel_grad, registered  (Gx, Gy)
//   4. sobel_mag, registered   (|Gx|+|Gy|, edge bit against thresh)
// For every interior pixel (1 <= x <= IMG_W-2, 1 <= y <= IMG_H-2) out_valid
// is high for one clock with its coordinates, magnitude and edge bit; the
// one-pixel border has no complete neighbourhood and is not produced. The
// first result leaves the pipeline 4 clocks after the pixel that completes
// its window is addressed. done pulses together with the last result: if
// start is high in clock cycle 0, done is high in cycle IMG_W*IMG_H + 4.
// busy is high from cycle 1 up to and including that cycle. thresh must stay stable while busy. Writes while
// busy are not allowed. The flow (RAM, window, gradients, magnitude) follows
// the source design; stage boundaries, the border rule and the handshake
// are this design's choices.
module sobel_edge #(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned AW    = $clog2(IMG_W * IMG_H),
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // picture load
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  sobel_pkg::pix_t   wr_data,
  // control
  input  logic              start,
  input  sobel_pkg::mag_t   thresh,
  output logic              busy,
  output logic              done,
  // edge image stream
  output logic              out_valid,
  output logic [XW-1:0]     out_x,
  output logic [YW-1:0]     out_y,
  output sobel_pkg::mag_t   out_mag,
  output logic              out_edge
);
  import sobel_pkg::*;

  localparam int unsigned NPIX = IMG_W * IMG_H;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN} state_t;
  state_t        state;
  logic [AW-1:0] raddr;
  logic          rd_valid;     // stage 1 holds a valid pixel
  logic          last_rd;      // stage 1 holds the last pixel of the frame
  logic [2:0]    last_pipe;    // last-pixel marker through stages 2..4

  // ---------------- scan controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      raddr    <= '0;
      rd_valid <= 1'b0;
      last_rd  <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      last_rd  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN;
          raddr <= '0;
        end
        S_SCAN: begin
          rd_valid <= 1'b1;
          if (raddr == AW'(NPIX - 1)) begin
            last_rd <= 1'b1;
            state   <= S_DRAIN;
          end else begin
            raddr <= raddr + AW'(1);
          end
        end
        S_DRAIN: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- stage 1: RAM ----------------
  pix_t pix;
  image_ram #(.DEPTH(NPIX), .AW(AW)) u_ram (
    .clk   (clk),
    .we    (wr_en),
    .waddr (wr_addr),
    .wdata (wr_data),
    .raddr (raddr),
    .rdata (pix)
  );

  // ---------------- stage 2: window ----------------
  win_t          win;
  logic          win_valid;
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;
  window_3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H), .XW(XW), .YW(YW)) u_win (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (start && state == S_IDLE),
    .in_valid  (rd_valid),
    .in_pix    (pix),
    .win_valid (win_valid),
    .win       (win),
    .ctr_x     (wx),
    .ctr_y     (wy)
  );

  // ---------------- stage 3: gradients ----------------
  grad_t gx_c, gy_c, gx_q, gy_q;
  logic  g_valid;
  logic [XW-1:0] gx_x;
  logic [YW-1:0] gy_y;
  sobel_grad u_grad (.win(win), .gx(gx_c), .gy(gy_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_valid <= 1'b0;
      gx_q    <= '0;
      gy_q    <= '0;
      gx_x    <= '0;
      gy_y    <= '0;
    end else begin
      g_valid <= win_valid;
      if (win_valid) begin
        gx_q <= gx_c;
        gy_q <= gy_c;
        gx_x <= wx;
        gy_y <= wy;
      end
    end
  end

  // ---------------- stage 4: magnitude and threshold ----------------
  mag_t mag_c;
  logic edge_c;
  sobel_mag u_mag (.gx(gx_q), .gy(gy_q), .thresh(thresh), .mag(mag_c), .edge_px(edge_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_mag   <= '0;
      out_edge  <= 1'b0;
      last_pipe <= '0;
    end else begin
      out_valid <= g_valid;
      if (g_valid) begin
        out_x    <= gx_x;
        out_y    <= gy_y;
        out_mag  <= mag_c;
        out_edge <= edge_c;
      end
      last_pipe <= {last_pipe[1:0], last_rd};
    end
  end

  assign done = last_pipe[2];

  // The frame store must not change under a running scan.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !wr_en)
    else $error("sobel_edge: write to image RAM while busy");
endmodule
