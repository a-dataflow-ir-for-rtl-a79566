// ripl_zipwith: the zipWith skeleton, two image streams combined in lock step.
//
// zipWith slides a non-overlapping vector of A pixels over two images at the
// same time and applies a user function from two A-vectors to one A-vector.
// Like map it is stateless: its storage is the two input vectors (2*A pixels).
// The vectors are shown to the parent on fn_arg_a and fn_arg_b, and the parent
// returns the A results on fn_res.
//
// Operation: each input gathers its own vector independently (element 0
// first); when both are complete the A results are emitted in order, then
// both vectors are gathered again. A vector costs A + A cycles without stalls.
module ripl_zipwith #(
  parameter int unsigned A     = 1,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     a_valid,
  output logic                     a_ready,
  input  logic [IN_W-1:0]          a_data,
  input  logic                     b_valid,
  output logic                     b_ready,
  input  logic [IN_W-1:0]          b_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [OUT_W-1:0]         out_data,
  output logic [A-1:0][IN_W-1:0]   fn_arg_a,
  output logic [A-1:0][IN_W-1:0]   fn_arg_b,
  input  logic [A-1:0][OUT_W-1:0]  fn_res
);
  localparam int unsigned CW = $clog2(A + 1);

  logic [A-1:0][IN_W-1:0] va, vb;
  logic [CW-1:0]          na, nb, no;
  logic                   full;

  assign full      = (na == CW'(A)) && (nb == CW'(A));
  assign a_ready   = (na != CW'(A));
  assign b_ready   = (nb != CW'(A));
  assign out_valid = full;
  assign out_data  = fn_res[no];
  assign fn_arg_a  = va;
  assign fn_arg_b  = vb;

  always_ff @(posedge clk) begin
    if (rst) begin
      na <= '0;
      nb <= '0;
      no <= '0;
    end else begin
      if (a_valid && a_ready) begin
        va[na] <= a_data;
        na     <= na + 1'b1;
      end
      if (b_valid && b_ready) begin
        vb[nb] <= b_data;
        nb     <= nb + 1'b1;
      end
      if (full && out_ready) begin
        if (no == CW'(A - 1)) begin
          no <= '0;
          na <= '0;
          nb <= '0;
        end else begin
          no <= no + 1'b1;
        end
      end
    end
  end
endmodule
