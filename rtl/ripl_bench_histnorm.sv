// ripl_bench_histnorm: histogram normalisation of an image.
//
//   hist = foldVector image1 0 256 (\p hist -> hist[p]++)
//   cum  = scan hist 0 (\h acc -> acc + h)
//   out  = zipWithVector image1 cum (\p v -> v[p] * 255 / (M*N))
// The histogram of the frame is built by a foldVector actor with one bin per
// 8-bit value, turned into a cumulative (summed) histogram by a scan actor as
// its 256 bins stream past, and loaded into a zipWithVector actor, which maps
// every pixel p to cum[p]*255/(M*N): each grey level is spread in proportion
// to the fraction of pixels at or below it. As with thresholding, image1 is
// duplicated, and the wire to zipWithVector is a full M*N-entry frame FIFO,
// because no pixel can be mapped before the whole histogram is known.
// Bins and cumulative counts are CNT_W = clog2(M*N+1) bits (19 at 512x512).
//
// Interface: valid/ready 8-bit pixels in and out. The first output pixel of a
// frame follows the whole frame plus 256 cycles for the bins.
module ripl_bench_histnorm #(
  parameter int unsigned M = 512,
  parameter int unsigned N = 512
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

  localparam int unsigned NB    = HIST_B;
  localparam int unsigned CNT_W = $clog2(M * N + 1);

  typedef logic [CNT_W-1:0] cnt_t;

  logic   a_valid, a_ready, b_valid, b_ready;
  pixel_t a_data, b_data;
  logic   fa_valid, fa_ready, fb_valid, fb_ready;
  pixel_t fa_data, fb_data;
  logic   h_valid, h_ready, hw_valid, hw_ready;
  cnt_t   h_data, hw_data;
  logic   c_valid, c_ready, cw_valid, cw_ready;
  cnt_t   c_data, cw_data;

  pixel_t                   fv_pix;
  logic [NB-1:0][CNT_W-1:0] fv_vec, fv_res;
  cnt_t                     sc_tok, sc_acc, sc_res;
  pixel_t                   zv_pix, zv_res;
  logic [NB-1:0][CNT_W-1:0] zv_vec;

  // foldVector function: hist[p]++
  always_comb begin
    fv_res = fv_vec;
    fv_res[fv_pix] = fv_vec[fv_pix] + 1'b1;
  end

  // scan function: running sum of the bins
  assign sc_res = sc_acc + sc_tok;

  // zipWithVector function: cum[p] * 255 / (M*N)
  always_comb begin
    logic [CNT_W+8-1:0] scaled;
    scaled = (CNT_W+8)'(zv_vec[zv_pix]) * (CNT_W+8)'(255);
    zv_res = PIX_W'(scaled / (CNT_W+8)'(M * N));
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

  ripl_fold_vector #(.M(M), .N(N), .A(NB), .IN_W(PIX_W), .ACC_W(CNT_W), .INIT('0)) u_hist (
    .clk, .rst,
    .in_valid(fa_valid), .in_ready(fa_ready), .in_data(fa_data),
    .out_valid(h_valid), .out_ready(h_ready), .out_data(h_data),
    .fn_pix(fv_pix), .fn_vec(fv_vec), .fn_res(fv_res)
  );

  ripl_fifo #(.W(CNT_W), .DEPTH(1)) u_wire_hist (
    .clk, .rst, .in_valid(h_valid), .in_ready(h_ready), .in_data(h_data),
    .out_valid(hw_valid), .out_ready(hw_ready), .out_data(hw_data)
  );

  ripl_scan #(.LEN(NB), .IN_W(CNT_W), .ACC_W(CNT_W), .INIT('0)) u_cum (
    .clk, .rst,
    .in_valid(hw_valid), .in_ready(hw_ready), .in_data(hw_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data),
    .fn_pix(sc_tok), .fn_acc(sc_acc), .fn_res(sc_res)
  );

  ripl_fifo #(.W(CNT_W), .DEPTH(1)) u_wire_cum (
    .clk, .rst, .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(cw_valid), .out_ready(cw_ready), .out_data(cw_data)
  );

  ripl_zipwith_vector #(.M(M), .N(N), .B(NB), .IN_W(PIX_W), .V_W(CNT_W), .OUT_W(PIX_W)) u_norm (
    .clk, .rst,
    .v_valid(cw_valid), .v_ready(cw_ready), .v_data(cw_data),
    .in_valid(fb_valid), .in_ready(fb_ready), .in_data(fb_data),
    .out_valid, .out_ready, .out_data,
    .fn_pix(zv_pix), .fn_vec(zv_vec), .fn_res(zv_res)
  );
endmodule
