// ripl_zipwith_vector: the zipWithVector skeleton.
//
// Combines every pixel of an image with a random-access vector of B values by
// a user function. The vector arrives as B tokens on its own dataflow wire,
// element 0 first (for example the bins of a foldVector histogram), and is
// held for one whole frame of M*N pixels; the next frame needs a new vector.
// Storage is the B-element vector plus the incoming pixel.
//
// The parent sees the pixel on fn_pix and the whole vector on fn_vec and
// returns the new pixel on fn_res. Loading takes B cycles; afterwards pixels
// flow through combinationally, one per cycle.
module ripl_zipwith_vector #(
  parameter int unsigned M     = 512,
  parameter int unsigned N     = 512,
  parameter int unsigned B     = 256,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned V_W   = 19,
  parameter int unsigned OUT_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   v_valid,
  output logic                   v_ready,
  input  logic [V_W-1:0]         v_data,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [IN_W-1:0]        in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [OUT_W-1:0]       out_data,
  output logic [IN_W-1:0]        fn_pix,
  output logic [B-1:0][V_W-1:0]  fn_vec,
  input  logic [OUT_W-1:0]       fn_res
);
  localparam int unsigned CW = $clog2(M * N + 1);
  localparam int unsigned BW = $clog2(B + 1);

  logic [B-1:0][V_W-1:0] vec;
  logic [BW-1:0]         n_v;    // vector elements loaded
  logic [CW-1:0]         n_pix;
  logic                  loaded;

  assign loaded    = (n_v == BW'(B));
  assign v_ready   = !loaded;
  assign in_ready  = loaded && out_ready;
  assign out_valid = loaded && in_valid;
  assign out_data  = fn_res;
  assign fn_pix    = in_data;
  assign fn_vec    = vec;

  always_ff @(posedge clk) begin
    if (rst) begin
      n_v   <= '0;
      n_pix <= '0;
    end else if (!loaded) begin
      if (v_valid) begin
        vec[n_v] <= v_data;
        n_v      <= n_v + 1'b1;
      end
    end else if (in_valid && out_ready) begin
      if (n_pix == CW'(M * N - 1)) begin
        n_pix <= '0;
        n_v   <= '0;
      end else begin
        n_pix <= n_pix + 1'b1;
      end
    end
  end
endmodule
