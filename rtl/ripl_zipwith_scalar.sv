// ripl_zipwith_scalar: the zipWithScalar skeleton.
//
// Combines every pixel of an image with one scalar by a user function. The
// scalar arrives as a token on its own dataflow wire (for example the result
// of a foldScalar over the same image) and is held for one whole frame of
// M*N pixels; the next frame waits for the next scalar token. Storage is the
// scalar plus the incoming pixel, which waits in the input FIFO.
//
// The parent sees the pixel on fn_pix and the held scalar on fn_scalar and
// returns the new pixel on fn_res. Pixels flow through combinationally once
// the scalar is held: one pixel per cycle, no added latency.
module ripl_zipwith_scalar #(
  parameter int unsigned M     = 512,
  parameter int unsigned N     = 512,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned S_W   = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [S_W-1:0]   s_data,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data,
  output logic [IN_W-1:0]  fn_pix,
  output logic [S_W-1:0]   fn_scalar,
  input  logic [OUT_W-1:0] fn_res
);
  localparam int unsigned CW = $clog2(M * N + 1);

  logic           have_s;
  logic [S_W-1:0] scalar_q;
  logic [CW-1:0]  n_pix;

  assign s_ready   = !have_s;
  assign in_ready  = have_s && out_ready;
  assign out_valid = have_s && in_valid;
  assign out_data  = fn_res;
  assign fn_pix    = in_data;
  assign fn_scalar = scalar_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_s <= 1'b0;
      n_pix  <= '0;
    end else if (!have_s) begin
      if (s_valid) begin
        scalar_q <= s_data;
        have_s   <= 1'b1;
      end
    end else if (in_valid && out_ready) begin
      if (n_pix == CW'(M * N - 1)) begin
        n_pix  <= '0;
        have_s <= 1'b0;
      end else begin
        n_pix <= n_pix + 1'b1;
      end
    end
  end
endmodule
