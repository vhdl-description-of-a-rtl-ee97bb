// rtsvp: Real-Time Stereo Vision Processor.
//
// Turns a synchronised pair of video streams (left = reference, right =
// crossed image, one pixel pair per pixel clock) into a dense disparity map,
// one disparity per pixel clock. For every pixel it evaluates the sum of
// absolute differences (SAD) over a (2m+1) x (2n+1) window for each of the
// D_L disparities 0 .. D_L-1 in parallel and outputs the disparity with the
// smallest SAD.
//
// Structure: the Correlation Window Delayers (cwd) build, from two line
// delays and shift registers, the 2*D_L + 2 pixel streams the correlators
// need; D_L Stereo Disparity Correlators (sdc) each keep a recursive SAD for
// one disparity and reduce it to OW bits; the Disparity Comparator (dc)
// selects the minimum.
//
// Interface: `in_valid` marks a pixel pair; gaps (blanking) are allowed and
// simply pause the pipeline. The stream is a continuous raster of N x M
// frames starting with pixel (0,0) of the first frame after reset; there is
// no line or frame sync input. Each `out_valid` carries the disparity `disp`
// of the window centred at (`out_x`, `out_y`) with its reduced SAD
// `out_corr`. The centre trails the input by L = n + m*N pixels (plus D_L-1
// with CROSS_AHEAD), so outputs lag their inputs by L accepted pixels and
// 4 + log2(D_L) register stages. Windows are not clipped at the image
// border: within m lines or n columns of a border they reach into the
// neighbouring line or frame (zeros before the first frame), so those
// disparities are not meaningful.
// The three-block structure and the default sizes (I_B=8, D_L=32, 256-pixel
// lines, 11x11 window) follow the published configuration; the centre
// coordinates, the handshake and the border behaviour are this design's.
//
// Left-right check (LR_CHECK = 1, off by default): a second bank of D_L
// correlators and a second comparator compute the disparity map with the
// right image as reference from the same window delayers, and lr_check flags
// each output whose disparity is not confirmed by the reverse map (`lr_ok`).
// Requires CROSS_AHEAD = 1. Costs D_L more correlators, no window-delayer
// storage. With the check off, the reverse taps of the window delayers are
// left unread.
//
// Lint notes rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the lock-step assertions.
module rtsvp
  import rtsvp_pkg::*;
#(
  parameter int unsigned IB          = DEF_IB,  // pixel bits I_B
  parameter int unsigned DL          = DEF_DL,  // disparity limit D_L
  parameter int unsigned N           = DEF_N,   // pixels per line
  parameter int unsigned M           = DEF_M,   // lines per frame
  parameter int unsigned WM          = DEF_WM,  // window half height m
  parameter int unsigned WN          = DEF_WN,  // window half width n
  parameter int unsigned OW          = IB,      // reduced correlation width
  parameter bit          CROSS_AHEAD = 1'b1,    // 1: c = |L(x) - R(x+d)|, 0: |L(x) - R(x-d)|
  parameter bit          LR_CHECK    = 1'b0,    // 1: add the reverse bank and the left-right check
  localparam int unsigned DW = disp_width(DL),
  localparam int unsigned XW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned YW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IB-1:0] pix_l,
  input  logic [IB-1:0] pix_r,
  output logic          out_valid,
  output logic [DW-1:0] disp,
  output logic [OW-1:0] out_corr,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output logic          lr_ok     // left-right check passed (1 when the check is not built)
);

  localparam int unsigned CW = c_width(IB, WM, WN);

  // ---------------------------------------------------------------- CWD
  logic          cwd_valid;
  logic [IB-1:0] ref_head, ref_tail;
  logic [IB-1:0] cross_head [DL];
  logic [IB-1:0] cross_tail [DL];
  logic [IB-1:0] rev_ref_head, rev_ref_tail;
  logic [IB-1:0] rev_cross_head [DL];
  logic [IB-1:0] rev_cross_tail [DL];

  cwd #(.IB(IB), .DL(DL), .N(N), .WM(WM), .CROSS_AHEAD(CROSS_AHEAD)) u_cwd (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(cwd_valid), .ref_head, .ref_tail, .cross_head, .cross_tail,
    .rev_ref_head, .rev_ref_tail, .rev_cross_head, .rev_cross_tail
  );

  // ---------------------------------------------------------------- SDC bank
  logic          sdc_valid [DL];
  logic [OW-1:0] corr [DL];

  for (genvar d = 0; d < int'(DL); d++) begin : g_sdc
    logic [CW-1:0] c_full_unused;
    sdc #(.IB(IB), .N(N), .WM(WM), .WN(WN), .OW(OW)) u_sdc (
      .clk, .rst_n, .in_valid(cwd_valid),
      .ref_head, .cross_head(cross_head[d]), .ref_tail, .cross_tail(cross_tail[d]),
      .out_valid(sdc_valid[d]), .c_full(c_full_unused), .c_red(corr[d])
    );
  end

  // ---------------------------------------------------------------- DC
  dc #(.DL(DL), .OW(OW)) u_dc (
    .clk, .rst_n, .in_valid(sdc_valid[0]), .corr,
    .out_valid, .disp, .min_corr(out_corr)
  );

  // ---------------------------------------------------------------- left-right check
  // A second correlator bank and comparator on the reverse taps of the same
  // window delayers give the disparity map with the right image as reference.
  if (LR_CHECK) begin : g_lr
    logic          rev_valid [DL];
    logic [OW-1:0] rev_corr [DL];
    logic          rev_out_valid;
    logic [DW-1:0] rev_disp;
    logic [OW-1:0] rev_min_unused;

    for (genvar d = 0; d < int'(DL); d++) begin : g_rev_sdc
      logic [CW-1:0] c_full_unused;
      sdc #(.IB(IB), .N(N), .WM(WM), .WN(WN), .OW(OW)) u_sdc (
        .clk, .rst_n, .in_valid(cwd_valid),
        .ref_head(rev_ref_head), .cross_head(rev_cross_head[d]),
        .ref_tail(rev_ref_tail), .cross_tail(rev_cross_tail[d]),
        .out_valid(rev_valid[d]), .c_full(c_full_unused), .c_red(rev_corr[d])
      );
    end

    dc #(.DL(DL), .OW(OW)) u_dc_rev (
      .clk, .rst_n, .in_valid(rev_valid[0]), .corr(rev_corr),
      .out_valid(rev_out_valid), .disp(rev_disp), .min_corr(rev_min_unused)
    );

    lr_check #(.DL(DL)) u_lr (
      .clk, .rst_n, .in_valid(out_valid), .disp_fwd(disp), .disp_rev(rev_disp), .lr_ok
    );

    a_rev_lockstep: assert property (@(posedge clk) disable iff (!rst_n) rev_out_valid == out_valid);
    if (!CROSS_AHEAD) begin : g_bad_cfg
      $error("rtsvp: the left-right check needs CROSS_AHEAD = 1");
    end
  end else begin : g_no_lr
    assign lr_ok = 1'b1;
  end

  // ---------------------------------------------------------------- centre position
  // Output k (counted from reset) belongs to raster index k - L; the counter
  // starts at that index modulo one frame.
  localparam longint unsigned FRAME = longint'(N) * longint'(M);
  localparam longint unsigned LAT   = longint'(WN) + longint'(WM) * longint'(N)
                                    + (CROSS_AHEAD ? longint'(DL) - 1 : 0);
  localparam longint unsigned START = (FRAME - (LAT % FRAME)) % FRAME;
  localparam int unsigned     X0    = int'(START % longint'(N));
  localparam int unsigned     Y0    = int'(START / longint'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_x <= XW'(X0);
      out_y <= YW'(Y0);
    end else if (out_valid) begin
      if (out_x == XW'(N - 1)) begin
        out_x <= '0;
        out_y <= (out_y == YW'(M - 1)) ? '0 : out_y + 1'b1;
      end else begin
        out_x <= out_x + 1'b1;
      end
    end
  end

  // All correlators run in lock step.
  for (genvar d = 1; d < int'(DL); d++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) sdc_valid[d] == sdc_valid[0]);
  end

endmodule
