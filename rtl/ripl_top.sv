// ripl_top: the RIPL benchmark programs compiled to dataflow hardware.
//
// Each program is a pipeline of skeleton actors (map, imap, filter2D,
// convolve, zipWith, zipWithScalar, zipWithVector, unzip, foldScalar,
// foldVector, scan, transpose) joined by FIFO dataflow wires. The programs are
// independent of one another and stand side by side here, each with its own
// pixel streams brought out as valid/ready ports: the image sources (imread)
// and sinks (out) of the programs are outside this design. All of them work
// on M x N single-channel 8-bit images, 512 x 512 by default.
//
//   bri  brighten by 50, saturating              map
//   sob  Sobel |Gx|+|Gy|                         filter2D
//   eb   Sobel, then 5-tap blur                  filter2D -> imap
//   thr  threshold at (max pixel - 50)           dup, foldScalar, zipWithScalar
//   hn   histogram normalisation                 dup, foldVector, scan, zipWithVector
//   tr   transpose                               transpose
//   shp  sharpen with {0,-1,0,-1,5,-1,0,-1,0}    convolve
//   avg  (p1+p2)/2 of two images                 zipWith
//   uz   even and odd pixels into two images     unzip
//
// Memory: the only frame-sized stores are the frame FIFOs of thr and hn and
// the transpose buffer (M*N pixels each); filter2D and convolve hold 2*M+3
// pixels; everything else holds a few pixels, a scalar or the 256-bin
// histogram. Timing per pipeline is given in each module's header.
module ripl_top #(
  parameter int unsigned M = ripl_pkg::IMG_M,
  parameter int unsigned N = ripl_pkg::IMG_N
) (
  input  logic clk,
  input  logic rst,
  // image brighten (map)
  input  logic bri_in_valid,
  output logic bri_in_ready,
  input  ripl_pkg::pixel_t bri_in_data,
  output logic bri_out_valid,
  input  logic bri_out_ready,
  output ripl_pkg::pixel_t bri_out_data,
  // Sobel edge detection (filter2D), 11-bit magnitude
  input  logic sob_in_valid,
  output logic sob_in_ready,
  input  ripl_pkg::pixel_t sob_in_data,
  output logic sob_out_valid,
  input  logic sob_out_ready,
  output logic [10:0] sob_out_data,
  // Sobel then 5-tap blur (filter2D -> imap), 12-bit
  input  logic eb_in_valid,
  output logic eb_in_ready,
  input  ripl_pkg::pixel_t eb_in_data,
  output logic eb_out_valid,
  input  logic eb_out_ready,
  output logic [11:0] eb_out_data,
  // threshold with the frame maximum (foldScalar, zipWithScalar)
  input  logic thr_in_valid,
  output logic thr_in_ready,
  input  ripl_pkg::pixel_t thr_in_data,
  output logic thr_out_valid,
  input  logic thr_out_ready,
  output ripl_pkg::pixel_t thr_out_data,
  // histogram normalisation (foldVector, scan, zipWithVector)
  input  logic hn_in_valid,
  output logic hn_in_ready,
  input  ripl_pkg::pixel_t hn_in_data,
  output logic hn_out_valid,
  input  logic hn_out_ready,
  output ripl_pkg::pixel_t hn_out_data,
  // image transposition, row-major in, column-major out
  input  logic tr_in_valid,
  output logic tr_in_ready,
  input  ripl_pkg::pixel_t tr_in_data,
  output logic tr_out_valid,
  input  logic tr_out_ready,
  output ripl_pkg::pixel_t tr_out_data,
  // 3x3 sharpen (convolve), signed 12-bit
  input  logic shp_in_valid,
  output logic shp_in_ready,
  input  ripl_pkg::pixel_t shp_in_data,
  output logic shp_out_valid,
  input  logic shp_out_ready,
  output logic signed [11:0] shp_out_data,
  // mean of two images (zipWith)
  input  logic avg_a_valid,
  output logic avg_a_ready,
  input  ripl_pkg::pixel_t avg_a_data,
  input  logic avg_b_valid,
  output logic avg_b_ready,
  input  ripl_pkg::pixel_t avg_b_data,
  output logic avg_out_valid,
  input  logic avg_out_ready,
  output ripl_pkg::pixel_t avg_out_data,
  // split into even and odd pixels (unzip)
  input  logic uz_in_valid,
  output logic uz_in_ready,
  input  ripl_pkg::pixel_t uz_in_data,
  output logic uz_even_valid,
  input  logic uz_even_ready,
  output ripl_pkg::pixel_t uz_even_data,
  output logic uz_odd_valid,
  input  logic uz_odd_ready,
  output ripl_pkg::pixel_t uz_odd_data
);
  import ripl_pkg::*;

  ripl_bench_brighten #(.AMOUNT(50)) u_bri (
    .clk, .rst,
    .in_valid(bri_in_valid), .in_ready(bri_in_ready), .in_data(bri_in_data),
    .out_valid(bri_out_valid), .out_ready(bri_out_ready), .out_data(bri_out_data)
  );

  ripl_bench_sobel #(.M(M), .N(N), .OUT_W(11)) u_sob (
    .clk, .rst,
    .in_valid(sob_in_valid), .in_ready(sob_in_ready), .in_data(sob_in_data),
    .out_valid(sob_out_valid), .out_ready(sob_out_ready), .out_data(sob_out_data)
  );

  ripl_edge_blur #(.M(M), .N(N), .EDGE_W(11), .BLUR_W(12)) u_eb (
    .clk, .rst,
    .in_valid(eb_in_valid), .in_ready(eb_in_ready), .in_data(eb_in_data),
    .out_valid(eb_out_valid), .out_ready(eb_out_ready), .out_data(eb_out_data)
  );

  ripl_bench_threshold #(.M(M), .N(N), .OFFSET(50)) u_thr (
    .clk, .rst,
    .in_valid(thr_in_valid), .in_ready(thr_in_ready), .in_data(thr_in_data),
    .out_valid(thr_out_valid), .out_ready(thr_out_ready), .out_data(thr_out_data)
  );

  ripl_bench_histnorm #(.M(M), .N(N)) u_hn (
    .clk, .rst,
    .in_valid(hn_in_valid), .in_ready(hn_in_ready), .in_data(hn_in_data),
    .out_valid(hn_out_valid), .out_ready(hn_out_ready), .out_data(hn_out_data)
  );

  // transpose: one-pixel wire into the frame buffer
  logic   tr_w_valid, tr_w_ready;
  pixel_t tr_w_data;

  ripl_fifo #(.W(PIX_W), .DEPTH(1)) u_tr_wire (
    .clk, .rst,
    .in_valid(tr_in_valid), .in_ready(tr_in_ready), .in_data(tr_in_data),
    .out_valid(tr_w_valid), .out_ready(tr_w_ready), .out_data(tr_w_data)
  );

  ripl_transpose #(.M(M), .N(N), .W(PIX_W)) u_tr (
    .clk, .rst,
    .in_valid(tr_w_valid), .in_ready(tr_w_ready), .in_data(tr_w_data),
    .out_valid(tr_out_valid), .out_ready(tr_out_ready), .out_data(tr_out_data)
  );

  ripl_convolve #(.M(M), .N(N), .IN_W(PIX_W), .OUT_W(12)) u_shp (
    .clk, .rst,
    .in_valid(shp_in_valid), .in_ready(shp_in_ready), .in_data(shp_in_data),
    .out_valid(shp_out_valid), .out_ready(shp_out_ready), .out_data(shp_out_data)
  );

  // zipWith mean: [(p1 + p2) / 2]
  logic [0:0][PIX_W-1:0] avg_fa, avg_fb, avg_fr;
  always_comb begin
    logic [PIX_W:0] s;
    s = {1'b0, avg_fa[0]} + {1'b0, avg_fb[0]};
    avg_fr[0] = s[PIX_W:1];
  end

  ripl_zipwith #(.A(1), .IN_W(PIX_W), .OUT_W(PIX_W)) u_avg (
    .clk, .rst,
    .a_valid(avg_a_valid), .a_ready(avg_a_ready), .a_data(avg_a_data),
    .b_valid(avg_b_valid), .b_ready(avg_b_ready), .b_data(avg_b_data),
    .out_valid(avg_out_valid), .out_ready(avg_out_ready), .out_data(avg_out_data),
    .fn_arg_a(avg_fa), .fn_arg_b(avg_fb), .fn_res(avg_fr)
  );

  // unzip \[a, b] -> a and \[c, d] -> d
  logic [1:0][PIX_W-1:0] uz_arg;

  ripl_unzip #(.A(2), .IN_W(PIX_W), .OUT_W(PIX_W)) u_uz (
    .clk, .rst,
    .in_valid(uz_in_valid), .in_ready(uz_in_ready), .in_data(uz_in_data),
    .out1_valid(uz_even_valid), .out1_ready(uz_even_ready), .out1_data(uz_even_data),
    .out2_valid(uz_odd_valid), .out2_ready(uz_odd_ready), .out2_data(uz_odd_data),
    .fn_arg(uz_arg), .fn_res1(uz_arg[0]), .fn_res2(uz_arg[1])
  );
endmodule
