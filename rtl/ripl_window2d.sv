// ripl_window2d: the line buffer behind the convolve and filter2D skeletons.
//
// A KX x KY window (odd sizes, 3 x 3 by default) over an M x N row-major image
// needs, besides the newest pixel, everything back to the window's top-left
// tap: (KY-1)*M + KX pixels in all, which is 2*M+3 for 3 x 3 and is the whole
// memory cost of these skeletons. The pixels are kept in a circular buffer of
// exactly that many entries, written in stream order; the window taps are
// read from it by address arithmetic relative to the write slot. Processing
// of a frame starts once (KY-1)/2 rows and (KX-1)/2+1 pixels have arrived
// (one row and two pixels for 3 x 3), when the top-left pixel has all of its
// neighbours. Taps that fall outside the image repeat the nearest edge pixel,
// which for a 3 x 3 window is the same as mirroring the border rows and
// columns about the image edge.
//
// The window is presented on fn_arg in row-major order: for 3 x 3,
// fn_arg[0..2] is the row above (p1 p2 p3), fn_arg[3..5] the centre row
// (p4 p5 p6, p5 the pixel being computed) and fn_arg[6..8] the row below
// (p7 p8 p9). The parent computes the user function combinationally and
// returns it on fn_res, which is offered on the output stream.
//
// Timing: output (x,y) is offered once pixel (min(x+RX,M-1), min(y+RY,N-1))
// has arrived, RX = (KX-1)/2 and RY = (KY-1)/2. An input is accepted only if
// it would not overwrite a pixel still needed after this cycle, so the buffer
// never holds more than its (KY-1)*M+KX pixels, and in steady state one pixel
// enters and one result leaves every cycle. For 3 x 3 the first result of a
// frame leaves M+2 cycles after the first pixel entered; after the last pixel
// of a frame the final results are drained before the next frame is taken in,
// so one frame occupies M*N + M + 2 cycles when neither side stalls. in_ready
// depends combinationally on out_ready.
module ripl_window2d #(
  parameter int unsigned M     = 512,
  parameter int unsigned N     = 512,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8,
  parameter int unsigned KX    = 3,
  parameter int unsigned KY    = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [IN_W-1:0]       in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [OUT_W-1:0]      out_data,
  output logic [KX*KY-1:0][IN_W-1:0] fn_arg,
  input  logic [OUT_W-1:0]      fn_res
);
  localparam int unsigned RX = (KX - 1) / 2;
  localparam int unsigned RY = (KY - 1) / 2;
  localparam int unsigned D  = (KY - 1) * M + KX;   // 2*M+3 for 3 x 3
  localparam int unsigned AW = $clog2(D);
  localparam int unsigned LW = $clog2(M * N + 1) + 1;
  localparam int unsigned XW = $clog2(M);
  localparam int unsigned YW = $clog2(N);

  logic [IN_W-1:0] lbuf [D];
  logic [AW-1:0]   wr_addr;   // slot of the next incoming pixel
  logic [LW-1:0]   n_rx;      // pixels of this frame received
  logic [LW-1:0]   out_lin;   // linear index of the output pixel
  logic [XW-1:0]   ox;
  logic [YW-1:0]   oy;
  logic [LW-1:0]   need;      // pixels that must be in before out_lin

  localparam logic [LW-1:0] FRAME = LW'(M * N);

  always_comb begin
    logic [LW-1:0] nl;
    int ry, rx;
    // newest tap: RY rows down and RX pixels right, clamped to the image
    ry = ripl_pkg::clamp_idx(int'(oy) + int'(RY), int'(N)) - int'(oy);
    rx = ripl_pkg::clamp_idx(int'(ox) + int'(RX), int'(M)) - int'(ox);
    nl = out_lin + LW'(ry * int'(M) + rx);
    need = nl + 1'b1;
  end

  assign out_valid = (n_rx >= need);
  // The slot written by a new pixel belongs to the oldest tap of the current
  // output, so a write may happen in the same cycle that output is taken.
  assign in_ready  = (n_rx < FRAME) &&
                     (n_rx < out_lin + LW'(RY * M + RX + 1) + LW'(out_valid && out_ready));
  assign out_data  = fn_res;

  // Address of the pixel with linear index lin (known to be in the buffer).
  function automatic logic [AW-1:0] tap_addr(logic [LW-1:0] lin);
    logic [LW-1:0] back;
    back = n_rx - lin;                 // 1 .. D
    if (LW'(wr_addr) >= back) return AW'(LW'(wr_addr) - back);
    else                      return AW'(LW'(wr_addr) + LW'(D) - back);
  endfunction

  always_comb begin
    for (int dy = -int'(RY); dy <= int'(RY); dy++) begin
      for (int dx = -int'(RX); dx <= int'(RX); dx++) begin
        int cy, cx;
        logic [LW-1:0] lin;
        cy  = ripl_pkg::clamp_idx(int'(oy) + dy, int'(N)) - int'(oy);
        cx  = ripl_pkg::clamp_idx(int'(ox) + dx, int'(M)) - int'(ox);
        lin = out_lin + LW'(cy * int'(M) + cx);
        fn_arg[(dy + int'(RY)) * int'(KX) + (dx + int'(RX))] = lbuf[tap_addr(lin)];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) lbuf[wr_addr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr <= '0;
      n_rx    <= '0;
      out_lin <= '0;
      ox      <= '0;
      oy      <= '0;
    end else begin
      if (in_valid && in_ready) begin
        wr_addr <= (wr_addr == AW'(D - 1)) ? '0 : wr_addr + 1'b1;
        n_rx    <= n_rx + 1'b1;
      end
      if (out_valid && out_ready) begin
        if (out_lin == FRAME - 1'b1) begin
          out_lin <= '0;
          ox      <= '0;
          oy      <= '0;
          n_rx    <= '0;
        end else begin
          out_lin <= out_lin + 1'b1;
          if (ox == XW'(M - 1)) begin
            ox <= '0;
            oy <= oy + 1'b1;
          end else begin
            ox <= ox + 1'b1;
          end
        end
      end
    end
  end
endmodule
