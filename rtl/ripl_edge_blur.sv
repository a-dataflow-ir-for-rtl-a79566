// ripl_edge_blur: Sobel edge detection followed by a 1D blur.
//
//   image2 = filter2D image1 (3,3) (Sobel |Gx| + |Gy|)
//   image3 = imap image2 (\[.] -> ([.-2] + [.-1] + [.] + [.+1] + [.+2]) / 3)
// The two skeletons run concurrently on different parts of the stream: the
// Sobel actor (ripl_bench_sobel) feeds the imap actor over a depth-1 dataflow
// wire, because the imap's argument is a single pixel position. The imap
// holds a 5-pixel circular buffer. The blur divides the 5-tap sum by 3 as the
// program is written, so bright edges are amplified; the result is kept at
// full width (BLUR_W = 12 bits covers 5*2040/3 = 3400) rather than clipped.
//
// Interface: valid/ready 8-bit pixels in, valid/ready BLUR_W-bit pixels out,
// one per input pixel in row-major order.
module ripl_edge_blur #(
  parameter int unsigned M      = 512,
  parameter int unsigned N      = 512,
  parameter int unsigned EDGE_W = 11,
  parameter int unsigned BLUR_W = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  ripl_pkg::pixel_t    in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [BLUR_W-1:0]   out_data
);
  logic                  e_valid, e_ready, w_valid, w_ready;
  logic [EDGE_W-1:0]     e_data, w_data;
  logic [4:0][EDGE_W-1:0] win;
  logic [BLUR_W-1:0]     blur;

  always_comb begin
    int s;
    s = 0;
    for (int k = 0; k < 5; k++) s += int'(win[k]);
    blur = BLUR_W'(s / 3);
  end

  ripl_bench_sobel #(.M(M), .N(N), .OUT_W(EDGE_W)) u_sobel (
    .clk, .rst, .in_valid, .in_ready, .in_data,
    .out_valid(e_valid), .out_ready(e_ready), .out_data(e_data)
  );

  ripl_fifo #(.W(EDGE_W), .DEPTH(1)) u_wire (
    .clk, .rst,
    .in_valid(e_valid), .in_ready(e_ready), .in_data(e_data),
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data)
  );

  ripl_imap #(.M(M), .NEG(2), .POS(2), .IN_W(EDGE_W), .OUT_W(BLUR_W)) u_imap (
    .clk, .rst,
    .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .out_valid, .out_ready, .out_data,
    .fn_arg(win), .fn_res(blur)
  );
endmodule
