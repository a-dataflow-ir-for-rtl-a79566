// ripl_unzip: the unzip skeleton, one image stream split into two.
//
// unzip takes a non-overlapping vector of A pixels and applies two user
// functions to it, each from A pixels to one pixel. The two results go to two
// separate output streams, and the two functions are executed alternately:
// first the result of function 1 is sent on out1, then that of function 2 on
// out2, then the next vector is gathered. Each output image is therefore 1/A
// the length of the input in the sliding direction (half for A = 2). Storage
// is the A-pixel vector plus the incoming pixel.
//
// The vector is shown on fn_arg; the parent returns the two results on
// fn_res1 and fn_res2. A vector costs A + 2 cycles without stalls.
module ripl_unzip #(
  parameter int unsigned A     = 2,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_W-1:0]         in_data,
  output logic                    out1_valid,
  input  logic                    out1_ready,
  output logic [OUT_W-1:0]        out1_data,
  output logic                    out2_valid,
  input  logic                    out2_ready,
  output logic [OUT_W-1:0]        out2_data,
  output logic [A-1:0][IN_W-1:0]  fn_arg,
  input  logic [OUT_W-1:0]        fn_res1,
  input  logic [OUT_W-1:0]        fn_res2
);
  localparam int unsigned CW = $clog2(A + 1);

  typedef enum logic [1:0] {GATHER, EMIT1, EMIT2} state_e;

  state_e                 state;
  logic [A-1:0][IN_W-1:0] vec;
  logic [CW-1:0]          n_in;

  assign in_ready   = (state == GATHER);
  assign out1_valid = (state == EMIT1);
  assign out2_valid = (state == EMIT2);
  assign out1_data  = fn_res1;
  assign out2_data  = fn_res2;
  assign fn_arg     = vec;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= GATHER;
      n_in  <= '0;
    end else begin
      unique case (state)
        GATHER: if (in_valid) begin
          vec[n_in] <= in_data;
          if (n_in == CW'(A - 1)) begin
            n_in  <= '0;
            state <= EMIT1;
          end else begin
            n_in <= n_in + 1'b1;
          end
        end
        EMIT1: if (out1_ready) state <= EMIT2;
        EMIT2: if (out2_ready) state <= GATHER;
        default: state <= GATHER;
      endcase
    end
  end
endmodule
