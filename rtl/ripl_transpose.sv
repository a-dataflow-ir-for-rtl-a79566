// ripl_transpose: the transpose skeleton, a whole-frame buffer.
//
// Transposing a stream cannot start before the last row has arrived, so this
// actor stores an entire M x N frame (M*N pixels, the most costly skeleton)
// and then reads it back with a transposed index. The input is row-major
// (pixel (x,y) is the y*M+x-th token); the output is the same image in
// column-major order: column x=0 top to bottom, then column 1, and so on.
//
// Operation: a fill phase of M*N input cycles, then a drain phase of M*N
// output cycles. The read address steps by M down a column and returns to the
// top of the next column, so no multiplier is needed. A single buffer is used,
// so the next frame is accepted only after the drain; double buffering is not
// part of this design.
module ripl_transpose #(
  parameter int unsigned M = 512,
  parameter int unsigned N = 512,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = $clog2(M * N + 1);
  localparam int unsigned IW = $clog2(M * N);

  logic [W-1:0]  fbuf [M * N];
  logic          draining;
  logic [AW-1:0] wr_addr;
  logic [AW-1:0] rd_addr;
  logic [AW-1:0] col_top;     // address of the top of the current column
  logic [AW-1:0] n_out;

  assign in_ready  = !draining;
  assign out_valid = draining;
  assign out_data  = fbuf[IW'(rd_addr)];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) fbuf[IW'(wr_addr)] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      draining <= 1'b0;
      wr_addr  <= '0;
      rd_addr  <= '0;
      col_top  <= '0;
      n_out    <= '0;
    end else if (!draining) begin
      if (in_valid) begin
        if (wr_addr == AW'(M * N - 1)) begin
          wr_addr  <= '0;
          draining <= 1'b1;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
    end else if (out_ready) begin
      if (n_out == AW'(M * N - 1)) begin
        n_out    <= '0;
        rd_addr  <= '0;
        col_top  <= '0;
        draining <= 1'b0;
      end else begin
        n_out <= n_out + 1'b1;
        if (32'(rd_addr) + M >= M * N) begin
          rd_addr <= col_top + 1'b1;
          col_top <= col_top + 1'b1;
        end else begin
          rd_addr <= rd_addr + AW'(M);
        end
      end
    end
  end
endmodule
