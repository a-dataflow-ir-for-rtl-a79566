// ripl_bench_sobel: the Sobel edge-detection program, one filter2D.
//
//   filter2D image1 (3,3) (\p1 .. p9 ->
//       abs((p1 + 2*p2 + p3) - (p7 + 2*p8 + p9))
//     + abs((p3 + 2*p6 + p9) - (p1 + 2*p4 + p7)))
// gives the approximate gradient magnitude |Gx| + |Gy| of every pixel. The
// window p1..p9 is the 3x3 neighbourhood in row-major order from the 2*M+3
// pixel line buffer of ripl_window2d. The result can reach 4*255*2 = 2040, so
// the output is OUT_W = 11 bits wide, the upper bound the compiler infers for
// this expression; it is not clipped to 8 bits. The centre pixel p5 does not
// enter the Sobel function, so that window tap is left unused.
//
// Interface: valid/ready 8-bit pixel stream in over a depth-1 wire, valid/ready
// 11-bit stream out, one result per pixel in row-major order.
module ripl_bench_sobel #(
  parameter int unsigned M     = 512,
  parameter int unsigned N     = 512,
  parameter int unsigned OUT_W = 11
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  output logic               in_ready,
  input  ripl_pkg::pixel_t   in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [OUT_W-1:0]   out_data
);
  import ripl_pkg::*;

  logic   w_valid, w_ready;
  pixel_t w_data;
  logic [8:0][PIX_W-1:0] p;
  logic [OUT_W-1:0]      mag;

  always_comb begin
    int gy, gx;
    gy = (int'(p[0]) + 2 * int'(p[1]) + int'(p[2])) - (int'(p[6]) + 2 * int'(p[7]) + int'(p[8]));
    gx = (int'(p[2]) + 2 * int'(p[5]) + int'(p[8])) - (int'(p[0]) + 2 * int'(p[3]) + int'(p[6]));
    if (gy < 0) gy = -gy;
    if (gx < 0) gx = -gx;
    mag = OUT_W'(gx + gy);
  end

  ripl_fifo #(.W(PIX_W), .DEPTH(1)) u_wire (
    .clk, .rst, .in_valid, .in_ready, .in_data,
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data)
  );

  ripl_window2d #(.M(M), .N(N), .IN_W(PIX_W), .OUT_W(OUT_W)) u_filter2d (
    .clk, .rst,
    .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .out_valid, .out_ready, .out_data,
    .fn_arg(p), .fn_res(mag)
  );
endmodule
