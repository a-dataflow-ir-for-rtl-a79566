// ripl_scan: the scan skeleton, a running reduction.
//
// Like foldScalar, scan folds each incoming token into an accumulator that
// starts at INIT, but it emits every intermediate value: one output token per
// input token, the accumulator after that token is folded in. After LEN tokens
// (one image) the accumulator returns to INIT. Storage is the accumulator plus
// the incoming token.
//
// The parent sees the token on fn_pix and the accumulator on fn_acc and
// returns the new accumulator on fn_res, which is also the output token.
// Combinational in-to-out path: one token per cycle, no added latency.
module ripl_scan #(
  parameter int unsigned       LEN   = 512 * 512,
  parameter int unsigned       IN_W  = 8,
  parameter int unsigned       ACC_W = 32,
  parameter logic [ACC_W-1:0]  INIT  = '0
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
  localparam int unsigned CW = $clog2(LEN + 1);

  logic [ACC_W-1:0] acc;
  logic [CW-1:0]    n_tok;

  assign in_ready  = out_ready;
  assign out_valid = in_valid;
  assign out_data  = fn_res;
  assign fn_pix    = in_data;
  assign fn_acc    = acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= INIT;
      n_tok <= '0;
    end else if (in_valid && out_ready) begin
      if (n_tok == CW'(LEN - 1)) begin
        n_tok <= '0;
        acc   <= INIT;
      end else begin
        n_tok <= n_tok + 1'b1;
        acc   <= fn_res;
      end
    end
  end
endmodule
