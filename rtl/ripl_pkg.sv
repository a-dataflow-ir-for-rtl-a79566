// ripl_pkg: types and constants shared by the RIPL skeleton actors.
//
// Every actor in this library talks over the same kind of dataflow wire: a
// token bus with a valid/ready handshake. A token moves on a rising clock edge
// when both valid and ready are high; a producer that raises valid keeps its
// data stable until the token is taken. Pixels are single-channel 8-bit
// values, as in the evaluated benchmarks; the compiler's inferred widths for
// intermediate images (for example the 11-bit Sobel magnitude) are carried as
// module parameters. The default image size is the 512x512 frame used in the
// evaluation. The handshake convention and reset polarity are this library's
// own choice.
package ripl_pkg;
  localparam int unsigned PIX_W   = 8;    // single-channel pixel width
  localparam int unsigned IMG_M   = 512;  // default image width
  localparam int unsigned IMG_N   = 512;  // default image height
  localparam int unsigned HIST_B  = 256;  // histogram bins, one per 8-bit value

  typedef logic [PIX_W-1:0] pixel_t;

  // Clamp a coordinate into [0, lim-1]; used to repeat edge pixels when a
  // sliding window reaches over the image border.
  function automatic int clamp_idx(int i, int lim);
    if (i < 0) return 0;
    if (i > lim - 1) return lim - 1;
    return i;
  endfunction
endpackage
