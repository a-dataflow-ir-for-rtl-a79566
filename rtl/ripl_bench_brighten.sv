// ripl_bench_brighten: the image-brighten program, a single map.
//
// Every pixel is raised by 50 and saturated at 255:
//   map image1 (\[p] -> [min 255 (p + 50)]).
// The input arrives over a depth-1 dataflow wire (ripl_fifo) into a map actor
// with a one-pixel vector (A = B = 1); the brighten function is the
// combinational logic returned to the map. Its only storage is the one-pixel
// wire and the one-pixel vector, independent of the image size.
//
// Interface: valid/ready pixel stream in and out. A pixel takes two cycles
// through the map (gather, emit) when neither side stalls.
module ripl_bench_brighten #(
  parameter int unsigned AMOUNT = 50
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  ripl_pkg::pixel_t      in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output ripl_pkg::pixel_t      out_data
);
  import ripl_pkg::*;

  logic   w_valid, w_ready;
  pixel_t w_data;
  logic [0:0][PIX_W-1:0] arg, res;

  always_comb begin
    logic [PIX_W:0] sum;
    sum = {1'b0, arg[0]} + (PIX_W+1)'(AMOUNT);
    res[0] = (sum > 255) ? 8'd255 : sum[PIX_W-1:0];
  end

  ripl_fifo #(.W(PIX_W), .DEPTH(1)) u_wire (
    .clk, .rst, .in_valid, .in_ready, .in_data,
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data)
  );

  ripl_map #(.A(1), .B(1), .IN_W(PIX_W), .OUT_W(PIX_W)) u_map (
    .clk, .rst,
    .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .out_valid, .out_ready, .out_data,
    .fn_arg(arg), .fn_res(res)
  );
endmodule
