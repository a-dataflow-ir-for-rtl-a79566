// ripl_convolve: the convolve skeleton, a constant kernel over the image stream.
//
// convolve replaces each pixel by the weighted sum of its KX x KY
// neighbourhood (3 x 3 by default), using a small constant kernel given in
// row-major order. It shares the (KY-1)*M+KX pixel line buffer of filter2D
// (ripl_window2d; 2*M+3 pixels for 3 x 3) and adds the multiply-accumulate as
// its built-in function. A non-default KX or KY needs a kernel K of KX*KY
// entries and an OUT_W large enough for it. The default kernel is the sharpening
// kernel {0,-1,0,-1,5,-1,0,-1,0}. The output is the exact signed sum, sized to
// hold any result of the kernel over 8-bit pixels (12 bits for the default);
// no scaling or saturation is applied, which is this design's own choice.
//
// Interface and timing are those of ripl_window2d: a valid/ready pixel input,
// a valid/ready output of signed OUT_W-bit results, one result per input pixel
// in the same row-major order.
module ripl_convolve #(
  parameter int unsigned M      = 512,
  parameter int unsigned N      = 512,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned KX     = 3,
  parameter int unsigned KY     = 3,
  parameter int          K [KX*KY] = '{0, -1, 0, -1, 5, -1, 0, -1, 0}
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_W-1:0]         in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data
);
  logic [KX*KY-1:0][IN_W-1:0] win;
  logic [OUT_W-1:0]     acc_res;

  always_comb begin
    int acc;
    acc = 0;
    for (int k = 0; k < int'(KX * KY); k++) acc += K[k] * int'({1'b0, win[k]});
    acc_res = OUT_W'(acc);
  end

  ripl_window2d #(.M(M), .N(N), .IN_W(IN_W), .OUT_W(OUT_W), .KX(KX), .KY(KY)) u_win (
    .clk, .rst,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data(out_data),
    .fn_arg(win), .fn_res(acc_res)
  );
endmodule
