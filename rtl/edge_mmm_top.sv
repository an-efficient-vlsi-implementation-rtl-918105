// edge_mmm_top: the Sobel edge detector and the Montgomery modular
// multiplier of this design, side by side.
//
// The edge detector (sobel_edge) takes a grey-level picture through its
// load port and streams out the edge image; the multiplier (mmm) computes
// A*B*2^-K mod M for the lightweight public-key arithmetic the design is
// meant to accompany. The source design presents both under one title but
// gives no signal that passes between them, so here they share only clock
// and reset and each keeps its own ports. Parameters: IMG_W x IMG_H picture
// (256 x 256 by default) and K-bit operands (256 by default); both defaults
// are this design's choices.
module edge_mmm_top #(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned K     = 256,
  parameter int unsigned AW    = $clog2(IMG_W * IMG_H),
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Sobel edge detector
  input  logic              img_wr_en,
  input  logic [AW-1:0]     img_wr_addr,
  input  sobel_pkg::pix_t   img_wr_data,
  input  logic              sobel_start,
  input  sobel_pkg::mag_t   sobel_thresh,
  output logic              sobel_busy,
  output logic              sobel_done,
  output logic              edge_valid,
  output logic [XW-1:0]     edge_x,
  output logic [YW-1:0]     edge_y,
  output sobel_pkg::mag_t   edge_mag,
  output logic              edge_bit,
  // Montgomery modular multiplier
  input  logic              mmm_start,
  input  logic [K-1:0]      mmm_a,
  input  logic [K-1:0]      mmm_b,
  input  logic [K-1:0]      mmm_m,
  output logic              mmm_busy,
  output logic              mmm_done,
  output logic [K:0]        mmm_p
);
  sobel_edge #(.IMG_W(IMG_W), .IMG_H(IMG_H), .AW(AW), .XW(XW), .YW(YW)) u_sobel (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (img_wr_en),
    .wr_addr   (img_wr_addr),
    .wr_data   (img_wr_data),
    .start     (sobel_start),
    .thresh    (sobel_thresh),
    .busy      (sobel_busy),
    .done      (sobel_done),
    .out_valid (edge_valid),
    .out_x     (edge_x),
    .out_y     (edge_y),
    .out_mag   (edge_mag),
    .out_edge  (edge_bit)
  );

  mmm #(.K(K)) u_mmm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mmm_start),
    .a     (mmm_a),
    .b     (mmm_b),
    .m     (mmm_m),
    .busy  (mmm_busy),
    .done  (mmm_done),
    .p     (mmm_p)
  );
endmodule
