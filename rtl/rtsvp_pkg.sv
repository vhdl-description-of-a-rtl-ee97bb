// rtsvp_pkg: default configuration of the real-time stereo vision processor.
//
// The processor matches a left and a right video stream with a sum of absolute
// differences (SAD) over a (2m+1) x (2n+1) window for D_L disparities and
// reports, per pixel, the disparity of the smallest SAD. The defaults are the
// 256-pixel-wide, 32-disparity, 11x11-window, 8-bit configuration of the
// published synthesis results; every module takes them as parameter defaults
// and each can be overridden per instance.
//
// The helper functions give the bus widths the architecture is built on:
// a column sum needs I_B + log2(2m+1) bits and a window sum
// I_B + log2((2n+1)(2m+1)) bits (rounded up).
package rtsvp_pkg;

  localparam int unsigned DEF_IB = 8;    // pixel intensity bits (I_B)
  localparam int unsigned DEF_DL = 32;   // disparity limit (D_L), one correlator per disparity
  localparam int unsigned DEF_N  = 256;  // pixels per image line (N)
  localparam int unsigned DEF_M  = 256;  // lines per image (M)
  localparam int unsigned DEF_WM = 5;    // vertical window half size (m), window height 2m+1
  localparam int unsigned DEF_WN = 5;    // horizontal window half size (n), window width 2n+1

  // Bits of a column sum of 2m+1 absolute differences of ib-bit pixels.
  function automatic int unsigned vc_width(int unsigned ib, int unsigned wm);
    return ib + $clog2(2 * wm + 1);
  endfunction

  // Bits of a window sum of (2n+1)(2m+1) absolute differences.
  function automatic int unsigned c_width(int unsigned ib, int unsigned wm, int unsigned wn);
    return ib + $clog2((2 * wn + 1) * (2 * wm + 1));
  endfunction

  // Bits of a disparity index 0 .. dl-1 (at least one).
  function automatic int unsigned disp_width(int unsigned dl);
    return (dl > 1) ? $clog2(dl) : 1;
  endfunction

endpackage
