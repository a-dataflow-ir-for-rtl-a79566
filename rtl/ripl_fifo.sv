// ripl_fifo: a dataflow wire between two RIPL actors.
//
// A first-in first-out token queue of DEPTH entries of W bits. When a
// skeleton's output is used in one place the wire needs only the vector
// length of the consumer (depth 1 for a one-pixel lambda, the default); when
// an image is duplicated to a reduction and to a consumer that must wait for
// it, the wire to that consumer is as deep as the whole frame (M*N entries).
// The storage is a plain array, so synthesis may place it in registers, LUT
// RAM or block RAM as its size suggests.
//
// Interface: in_valid/in_ready/in_data and out_valid/out_ready/out_data, each
// a valid/ready handshake. The head token is shown combinationally from the
// array (no read latency). A full FIFO still accepts a write in a cycle in
// which its head is read, so a depth-1 wire passes one token per cycle; this
// makes in_ready depend combinationally on out_ready, a choice of this design.
module ripl_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
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
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign in_ready  = (count < (AW+1)'(DEPTH)) || out_ready;
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // A producer must hold its token until it is accepted.
  a_in_stable: assert property (@(posedge clk) disable iff (rst)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_data)));
endmodule
