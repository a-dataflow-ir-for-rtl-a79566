// ripl_imap: the indexed-map skeleton actor, a 1D overlapping window.
//
// imap computes every output pixel from the pixel at the same position and
// its neighbours [.-NEG] .. [.+POS] along a row of M pixels, so consecutive
// executions overlap (a 3-tap window moves by one pixel per output). Incoming
// pixels are written into a circular buffer of NEG+POS+1 entries; the buffer
// slot of the midpoint [.] advances by one for every output, and the user
// function reads the window around it. Only the window is stored, never a
// row, so the cost is independent of the image size.
//
// The user function is supplied by the parent: fn_arg[j] is the pixel at
// offset j-NEG from the midpoint (fn_arg[NEG] is [.]) and fn_res is the new
// pixel. At the ends of a row, offsets that fall outside the row repeat the
// edge pixel; this border rule is this design's own choice for imap.
//
// Timing: the output for position x is offered once pixel x+POS (or the last
// pixel of the row) has arrived; in steady state one pixel enters and one
// result leaves per cycle. At the end of a row the last outputs are drained
// before the next row is accepted, so a row occupies M + POS + 1 cycles when
// neither side stalls. in_ready depends combinationally on out_ready.
module ripl_imap #(
  parameter int unsigned M     = 512,
  parameter int unsigned NEG   = 1,
  parameter int unsigned POS   = 1,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [IN_W-1:0]             in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [OUT_W-1:0]            out_data,
  output logic [NEG+POS:0][IN_W-1:0]  fn_arg,
  input  logic [OUT_W-1:0]            fn_res
);
  localparam int unsigned WIN = NEG + POS + 1;
  localparam int unsigned XW  = $clog2(M + 1);
  localparam int unsigned SW  = (WIN > 1) ? $clog2(WIN) : 1;

  logic [IN_W-1:0] buf_q [WIN];
  logic [XW-1:0]   n_in;    // pixels of this row received
  logic [XW-1:0]   x_out;   // position of the next output
  logic [SW-1:0]   wslot;   // slot for the next incoming pixel
  logic [SW-1:0]   mslot;   // slot holding the midpoint pixel x_out
  logic            need_ok;

  // Output x_out can be computed once pixel min(x_out+POS, M-1) is in.
  always_comb begin
    if (32'(x_out) + POS >= M) need_ok = (n_in == XW'(M));
    else                       need_ok = (32'(n_in) > 32'(x_out) + POS);
  end

  // Accept while the row is incomplete and the oldest pixel still needed (x_out-NEG) would not be overwritten; that pixel's slot may be reused in
  // the cycle in which output x_out is taken.
  assign in_ready  = (n_in != XW'(M)) &&
                     (32'(n_in) < 32'(x_out) + POS + 1 + 32'(out_valid && out_ready));
  assign out_valid = need_ok;
  assign out_data  = fn_res;

  function automatic logic [SW-1:0] slot_add(logic [SW-1:0] s, int d);
    int r;
    r = (int'(s) + d) % int'(WIN);
    if (r < 0) r = r + int'(WIN);
    return SW'(r);
  endfunction

  always_comb begin
    for (int j = 0; j < WIN; j++) begin
      int pos, off;
      pos = ripl_pkg::clamp_idx(int'(x_out) + j - int'(NEG), int'(M));
      off = pos - int'(x_out);
      fn_arg[j] = buf_q[slot_add(mslot, off)];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) buf_q[wslot] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_in  <= '0;
      x_out <= '0;
      wslot <= '0;
      mslot <= '0;
    end else begin
      if (in_valid && in_ready) begin
        n_in  <= n_in + 1'b1;
        wslot <= slot_add(wslot, 1);
      end
      if (out_valid && out_ready) begin
        if (x_out == XW'(M - 1)) begin
          // Row complete: the next row starts in the slot after the last pixel.
          x_out <= '0;
          n_in  <= '0;
          mslot <= wslot;
        end else begin
          x_out <= x_out + 1'b1;
          mslot <= slot_add(mslot, 1);
        end
      end
    end
  end
endmodule
