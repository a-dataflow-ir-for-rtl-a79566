// ripl_fold_scalar: the foldScalar skeleton, an image reduced to one value.
//
// A user reduction folds every pixel of an M*N frame into an accumulator that
// starts at INIT (for example max p acc, giving the brightest pixel). After
// the last pixel of the frame the accumulated value is sent as one token on
// the output wire and the accumulator is reset to INIT for the next frame.
// Storage is the accumulator plus the incoming pixel.
//
// The parent sees the pixel on fn_pix and the accumulator on fn_acc and
// returns the new accumulator on fn_res. A pixel is taken every cycle; the
// result token is offered in the cycle after the last pixel, and no pixel is
// taken while it waits.
module ripl_fold_scalar #(
  parameter int unsigned         M     = 512,
  parameter int unsigned         N     = 512,
  parameter int unsigned         IN_W  = 8,
  parameter int unsigned         ACC_W = 8,
  parameter logic [ACC_W-1:0]    INIT  = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [ACC_W-1:0] out_data,
  output logic [IN_W-1:0]  fn_pix,
  output logic [ACC_W-1:0] fn_acc,
  input  logic [ACC_W-1:0] fn_res
);
  localparam int unsigned CW = $clog2(M * N + 1);

  logic [ACC_W-1:0] acc;
  logic [CW-1:0]    n_pix;
  logic             done;

  assign in_ready  = !done;
  assign out_valid = done;
  assign out_data  = acc;
  assign fn_pix    = in_data;
  assign fn_acc    = acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= INIT;
      n_pix <= '0;
      done  <= 1'b0;
    end else if (!done) begin
      if (in_valid) begin
        acc <= fn_res;
        if (n_pix == CW'(M * N - 1)) begin
          n_pix <= '0;
          done  <= 1'b1;
        end else begin
          n_pix <= n_pix + 1'b1;
        end
      end
    end else if (out_ready) begin
      acc  <= INIT;
      done <= 1'b0;
    end
  end
endmodule
