// ripl_fold_vector: the foldVector skeleton, an image reduced to a vector.
//
// A user function folds every pixel of an M*N frame into a vector of A
// elements, each starting at INIT (for example hist[p]++, giving a histogram
// with one bin per pixel value). After the last pixel of the frame the vector
// is sent as A tokens, element 0 first, and every element is reset to INIT.
// Storage is the A-element vector plus the incoming pixel.
//
// The parent sees the pixel on fn_pix and the whole vector on fn_vec and
// returns the updated vector on fn_res. A pixel is taken every cycle; the A
// result tokens follow the last pixel, one per cycle, and no pixel is taken
// while they are sent.
module ripl_fold_vector #(
  parameter int unsigned       M     = 512,
  parameter int unsigned       N     = 512,
  parameter int unsigned       A     = 256,
  parameter int unsigned       IN_W  = 8,
  parameter int unsigned       ACC_W = 19,
  parameter logic [ACC_W-1:0]  INIT  = '0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [IN_W-1:0]        in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [ACC_W-1:0]       out_data,
  output logic [IN_W-1:0]        fn_pix,
  output logic [A-1:0][ACC_W-1:0] fn_vec,
  input  logic [A-1:0][ACC_W-1:0] fn_res
);
  localparam int unsigned CW = $clog2(M * N + 1);
  localparam int unsigned AW = $clog2(A + 1);

  logic [A-1:0][ACC_W-1:0] vec;
  logic [CW-1:0]           n_pix;
  logic [AW-1:0]           n_out;
  logic                    done;

  assign in_ready  = !done;
  assign out_valid = done;
  assign out_data  = vec[n_out];
  assign fn_pix    = in_data;
  assign fn_vec    = vec;

  always_ff @(posedge clk) begin
    if (rst) begin
      vec   <= {A{INIT}};
      n_pix <= '0;
      n_out <= '0;
      done  <= 1'b0;
    end else if (!done) begin
      if (in_valid) begin
        vec <= fn_res;
        if (n_pix == CW'(M * N - 1)) begin
          n_pix <= '0;
          done  <= 1'b1;
        end else begin
          n_pix <= n_pix + 1'b1;
        end
      end
    end else if (out_ready) begin
      if (n_out == AW'(A - 1)) begin
        n_out <= '0;
        done  <= 1'b0;
        vec   <= {A{INIT}};
      end else begin
        n_out <= n_out + 1'b1;
      end
    end
  end
endmodule
