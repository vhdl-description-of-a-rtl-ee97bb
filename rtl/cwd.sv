// cwd: Correlation Window Delayers.
//
// Orders the incoming pixels of the two images so that every disparity
// correlator sees, each pixel clock, the four pixels its recursive sums need:
// the pixel entering the bottom ("head") row of the window and the pixel
// leaving its top ("tail") row, 2m+1 lines earlier, in the reference (left)
// image and in the crossed (right) image displaced by d.
//
// How it works: two delay_fifo line delays of (2m+1)*N pixels give the tail
// row of each image. A shift register of D_L pixels on each of the four
// streams (left/right, head/tail) provides the horizontal displacements.
// With CROSS_AHEAD = 1 (the default, following c = |I_L(x) - I_R(x+d)|) the
// reference is the left stream delayed by D_L-1 pixels and disparity d takes
// the right pixel D_L-1-d pixels back, i.e. d pixels ahead of the reference.
// With CROSS_AHEAD = 0 the reference is undelayed and disparity d takes the
// right pixel d pixels back (c = |I_L(x) - I_R(x-d)|), for the other camera
// arrangement. The result is 2*D_L + 2 pixel lines: two per disparity and
// two of the reference image.
//
// Interface and timing: one pixel pair per cycle with `in_valid` high (gaps
// allowed); outputs are registers that change one cycle after an accepted
// pair, flagged by `out_valid`. Pixels before reset count as 0. The stream is
// a continuous raster: lines and frames follow each other without markers.
// The block's role and its 2*D_L + 2 outputs follow the architecture; the
// split into line delays and shift registers, the left image as reference and
// the handshake are choices of this design.
//
// The same shift registers also hold every pixel a reverse correlator bank
// needs (right image as reference, left image crossed), so the `rev_*`
// outputs serve a left-right consistency check at no extra storage: with
// CROSS_AHEAD = 1 the reverse reference is the undelayed right pixel R(t) and
// disparity d takes L(t-d). Nothing reads them when the check is not built.
module cwd
  import rtsvp_pkg::*;
#(
  parameter int unsigned IB          = DEF_IB,
  parameter int unsigned DL          = DEF_DL,
  parameter int unsigned N           = DEF_N,
  parameter int unsigned WM          = DEF_WM,
  parameter bit          CROSS_AHEAD = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IB-1:0] pix_l,
  input  logic [IB-1:0] pix_r,
  output logic          out_valid,
  output logic [IB-1:0] ref_head,
  output logic [IB-1:0] ref_tail,
  output logic [IB-1:0] cross_head [DL],
  output logic [IB-1:0] cross_tail [DL],
  // Taps for a reverse correlator bank (right image as reference).
  output logic [IB-1:0] rev_ref_head,
  output logic [IB-1:0] rev_ref_tail,
  output logic [IB-1:0] rev_cross_head [DL],
  output logic [IB-1:0] rev_cross_tail [DL]
);

  localparam int unsigned LINE_DELAY = (2 * WM + 1) * N;

  logic [IB-1:0] tail_l, tail_r;
  logic [IB-1:0] lh_sr [DL];
  logic [IB-1:0] lt_sr [DL];
  logic [IB-1:0] rh_sr [DL];
  logic [IB-1:0] rt_sr [DL];

  delay_fifo #(.W(IB), .DEPTH(LINE_DELAY)) u_line_l (
    .clk, .rst_n, .en(in_valid), .din(pix_l), .dout(tail_l)
  );
  delay_fifo #(.W(IB), .DEPTH(LINE_DELAY)) u_line_r (
    .clk, .rst_n, .en(in_valid), .din(pix_r), .dout(tail_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DL); k++) begin
        lh_sr[k] <= '0;
        lt_sr[k] <= '0;
        rh_sr[k] <= '0;
        rt_sr[k] <= '0;
      end
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        lh_sr[0] <= pix_l;
        lt_sr[0] <= tail_l;
        rh_sr[0] <= pix_r;
        rt_sr[0] <= tail_r;
        for (int k = 1; k < int'(DL); k++) begin
          lh_sr[k] <= lh_sr[k-1];
          lt_sr[k] <= lt_sr[k-1];
          rh_sr[k] <= rh_sr[k-1];
          rt_sr[k] <= rt_sr[k-1];
        end
      end
    end
  end

  localparam int unsigned REF_TAP = CROSS_AHEAD ? DL - 1 : 0;

  assign ref_head = lh_sr[REF_TAP];
  assign ref_tail = lt_sr[REF_TAP];

  for (genvar d = 0; d < int'(DL); d++) begin : g_disp
    localparam int unsigned TAP = CROSS_AHEAD ? DL - 1 - d : d;
    assign cross_head[d] = rh_sr[TAP];
    assign cross_tail[d] = rt_sr[TAP];
  end

  // Reverse direction from the same registers: the right pixel is the
  // reference and the left pixel displaced the opposite way is crossed.
  localparam int unsigned REV_REF_TAP = CROSS_AHEAD ? 0 : DL - 1;

  assign rev_ref_head = rh_sr[REV_REF_TAP];
  assign rev_ref_tail = rt_sr[REV_REF_TAP];

  for (genvar d = 0; d < int'(DL); d++) begin : g_rev
    localparam int unsigned TAP = CROSS_AHEAD ? d : DL - 1 - d;
    assign rev_cross_head[d] = lh_sr[TAP];
    assign rev_cross_tail[d] = lt_sr[TAP];
  end

endmodule
