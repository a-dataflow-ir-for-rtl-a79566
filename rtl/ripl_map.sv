// ripl_map: the map skeleton actor.
//
// map slides over an image with a non-overlapping vector of A pixels, applies
// a user function from A pixels to B pixels, and emits the B results. It is
// stateless between executions, so its only storage is the A-pixel input
// vector. The user function is not part of this module: the gathered vector is
// presented on fn_arg and the parent supplies the B results on fn_res as a
// combinational function of it.
//
// Operation: collect A tokens (vector element 0 first), then emit the B
// results in order, element 0 first, then collect the next vector. One token
// moves per cycle; a vector therefore takes A + B cycles when neither side
// stalls. Gathering and emitting are not overlapped, which is this design's
// own simplification.
module ripl_map #(
  parameter int unsigned A     = 1,
  parameter int unsigned B     = 1,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [IN_W-1:0]           in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [OUT_W-1:0]          out_data,
  output logic [A-1:0][IN_W-1:0]    fn_arg,
  input  logic [B-1:0][OUT_W-1:0]   fn_res
);
  localparam int unsigned CW = $clog2((A > B ? A : B) + 1);

  logic [A-1:0][IN_W-1:0] vec;
  logic [CW-1:0]          n_in;   // elements gathered so far
  logic [CW-1:0]          n_out;  // results emitted so far
  logic                   full;

  assign full      = (n_in == CW'(A));
  assign in_ready  = !full;
  assign out_valid = full;
  assign out_data  = fn_res[n_out];
  assign fn_arg    = vec;

  always_ff @(posedge clk) begin
    if (rst) begin
      n_in  <= '0;
      n_out <= '0;
    end else if (!full) begin
      if (in_valid) begin
        vec[n_in] <= in_data;
        n_in      <= n_in + 1'b1;
      end
    end else if (out_ready) begin
      if (n_out == CW'(B - 1)) begin
        n_out <= '0;
        n_in  <= '0;
      end else begin
        n_out <= n_out + 1'b1;
      end
    end
  end
endmodule
