// ripl_bench_threshold: threshold an image against its own brightest pixel.
//
//   maxPixel = foldScalar image1 0 (\p i -> max p i)
//   out      = zipWithScalar image1 maxPixel
//                (\p maxP -> if p > (maxP - OFFSET) then 255 else 0)
// image1 is used twice, so its stream is duplicated (ripl_dup) onto two
// wires in lock step. The wire into the foldScalar actor is one pixel deep.
// The wire into the zipWithScalar actor must hold the whole frame: no pixel
// can be thresholded before the maximum is known, which is only after the
// last pixel, and without that depth the duplicator would stall and the
// program would deadlock. That wire is an M*N-entry ripl_fifo, the dominant
// memory of the design. The maximum travels to zipWithScalar over a depth-1
// wire. OFFSET defaults to 50; maxP - OFFSET is evaluated signed, so a frame
// darker than OFFSET thresholds every pixel to 255.
//
// Interface: valid/ready 8-bit pixels in and out. The first output pixel of a
// frame appears only after the whole frame has been received.
module ripl_bench_threshold #(
  parameter int unsigned M      = 512,
  parameter int unsigned N      = 512,
  parameter int unsigned OFFSET = 50
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  output logic               in_ready,
  input  ripl_pkg::pixel_t   in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output ripl_pkg::pixel_t   out_data
);
  import ripl_pkg::*;

  logic   a_valid, a_ready, b_valid, b_ready;
  pixel_t a_data, b_data;
  logic   fa_valid, fa_ready, fb_valid, fb_ready;
  pixel_t fa_data, fb_data;
  logic   m_valid, m_ready, s_valid, s_ready;
  pixel_t m_data, s_data;
  pixel_t fold_pix, fold_acc, fold_res;
  pixel_t zs_pix, zs_scalar, zs_res;

  // foldScalar function: max p acc
  assign fold_res = (fold_pix > fold_acc) ? fold_pix : fold_acc;

  // zipWithScalar function: binary threshold at maxP - OFFSET
  always_comb begin
    int thr;
    thr = int'(zs_scalar) - int'(OFFSET);
    zs_res = (int'(zs_pix) > thr) ? 8'd255 : 8'd0;
  end

  ripl_dup #(.W(PIX_W)) u_dup (
    .in_valid, .in_ready, .in_data,
    .a_valid, .a_ready, .a_data,
    .b_valid, .b_ready, .b_data
  );

  ripl_fifo #(.W(PIX_W), .DEPTH(1)) u_wire_fold (
    .clk, .rst, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(fa_valid), .out_ready(fa_ready), .out_data(fa_data)
  );

  ripl_fifo #(.W(PIX_W), .DEPTH(M * N)) u_wire_frame (
    .clk, .rst, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(fb_valid), .out_ready(fb_ready), .out_data(fb_data)
  );

  ripl_fold_scalar #(.M(M), .N(N), .IN_W(PIX_W), .ACC_W(PIX_W), .INIT('0)) u_fold (
    .clk, .rst,
    .in_valid(fa_valid), .in_ready(fa_ready), .in_data(fa_data),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data),
    .fn_pix(fold_pix), .fn_acc(fold_acc), .fn_res(fold_res)
  );

  ripl_fifo #(.W(PIX_W), .DEPTH(1)) u_wire_max (
    .clk, .rst, .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  ripl_zipwith_scalar #(.M(M), .N(N), .IN_W(PIX_W), .S_W(PIX_W), .OUT_W(PIX_W)) u_zip (
    .clk, .rst,
    .s_valid, .s_ready, .s_data,
    .in_valid(fb_valid), .in_ready(fb_ready), .in_data(fb_data),
    .out_valid, .out_ready, .out_data,
    .fn_pix(zs_pix), .fn_scalar(zs_scalar), .fn_res(zs_res)
  );
endmodule
