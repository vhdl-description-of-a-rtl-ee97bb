// sdc: Stereo Disparity Correlator, the SAD engine for one disparity.
//
// Computes, every pixel clock, the sum of absolute differences between a
// (2m+1) x (2n+1) window of the reference image and the same window of the
// crossed image displaced by this correlator's disparity. It never re-adds a
// whole window: it takes only four pixels per clock (head and tail, reference
// and crossed) and works through the recursions
//   VC(x,y) = VC(x,y-1) + c(head) - c(tail)        (column sum)
//   C(x,y)  = C(x-1,y)  + VC(x+n,y) - VC(x-n-1,y)  (window sum)
// Its parts: the AD block (sdc_ad), the VC block (sdc_vc), a FIFO of one line
// (N column sums) that feeds each column sum back to the same column one line
// later, the C block (sdc_c) with its output register and bit reduction, and a
// FIFO of 2n+1 column sums that supplies the column leaving the window.
//
// Timing: three register stages (AD, VC, C); `out_valid` follows `in_valid`
// by three cycles, one result per accepted input. All state starts at zero,
// so the first lines and columns after reset see zero-valued history.
// The window sum belongs to the window whose bottom-right pixel is the
// reference pixel that entered the AD block three stages earlier.
// The sub-blocks and recursions follow the architecture; the depth of the
// second FIFO (2n+1 column sums, as the window recursion requires) and the
// pipeline depth are choices of this design.
module sdc
  import rtsvp_pkg::*;
#(
  parameter int unsigned IB = DEF_IB,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned WM = DEF_WM,
  parameter int unsigned WN = DEF_WN,
  parameter int unsigned OW = IB,
  localparam int unsigned CW = c_width(IB, WM, WN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IB-1:0] ref_head,
  input  logic [IB-1:0] cross_head,
  input  logic [IB-1:0] ref_tail,
  input  logic [IB-1:0] cross_tail,
  output logic          out_valid,
  output logic [CW-1:0] c_full,
  output logic [OW-1:0] c_red
);

  localparam int unsigned VW = vc_width(IB, WM);

  logic          ad_valid, vc_valid;
  logic [IB-1:0] ad_head, ad_tail;
  logic [VW-1:0] vc_fb, vc_sum, vc, vc_old;

  sdc_ad #(.IB(IB)) u_ad (
    .clk, .rst_n, .in_valid,
    .ref_head, .cross_head, .ref_tail, .cross_tail,
    .out_valid(ad_valid), .ad_head, .ad_tail
  );

  // Column sums of the previous line, one per column.
  delay_fifo #(.W(VW), .DEPTH(N)) u_vc_fifo (
    .clk, .rst_n, .en(ad_valid), .din(vc_sum), .dout(vc_fb)
  );

  sdc_vc #(.IB(IB), .WM(WM)) u_vc (
    .clk, .rst_n, .in_valid(ad_valid), .ad_head, .ad_tail, .vc_fb,
    .vc_sum, .out_valid(vc_valid), .vc
  );

  // Column sums of the last 2n+1 columns; the output is the one leaving the window.
  delay_fifo #(.W(VW), .DEPTH(2 * WN + 1)) u_col_fifo (
    .clk, .rst_n, .en(vc_valid), .din(vc), .dout(vc_old)
  );

  sdc_c #(.IB(IB), .WM(WM), .WN(WN), .OW(OW)) u_c (
    .clk, .rst_n, .in_valid(vc_valid), .vc_new(vc), .vc_old,
    .out_valid, .c_full, .c_red
  );

endmodule
