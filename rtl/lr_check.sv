// lr_check: left-right consistency check of two disparity maps.
//
// A disparity found with the left image as reference, d_L at left pixel p,
// is accepted when the map computed with the right image as reference gives
// the same disparity at the matching right pixel, d_R(p + d_L) == d_L.
// Mismatches mark unreliable matches (occlusions, repetitive texture).
//
// How it works: the two maps arrive in lock step, the reverse map DL-1
// pixels ahead: together with d_L(p) comes d_R(p + DL - 1). A shift
// register keeps the last DL-1 reverse disparities, so d_R(p + d) for every
// d in 0 .. DL-1 is at hand and a multiplexer picks d = d_L.
//
// Interface and timing: `in_valid` marks a pair (`disp_fwd`, `disp_rev`);
// `lr_ok` is combinational, valid in the same cycle. The history is cleared
// by reset. The check itself (same disparity both ways, computed by a second
// correlator bank from the same window delayers) follows the architecture;
// the exact-equality rule and this alignment are choices of this design.
module lr_check
  import rtsvp_pkg::*;
#(
  parameter int unsigned DL = DEF_DL,
  localparam int unsigned DW = disp_width(DL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] disp_fwd,  // d_L(p)
  input  logic [DW-1:0] disp_rev,  // d_R(p + DL - 1)
  output logic          lr_ok
);

  // hist[k] = d_R(p + DL - 2 - k), i.e. the reverse disparity k+1 pixels back.
  logic [DW-1:0] hist [DL-1];
  logic [DW-1:0] cand [DL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DL) - 1; k++) hist[k] <= '0;
    end else if (in_valid) begin
      hist[0] <= disp_rev;
      for (int k = 1; k < int'(DL) - 1; k++) hist[k] <= hist[k-1];
    end
  end

  // cand[d] = d_R(p + d).
  always_comb begin
    for (int d = 0; d < int'(DL); d++)
      cand[d] = (d == int'(DL) - 1) ? disp_rev : hist[int'(DL) - 2 - d];
  end

  assign lr_ok = (int'(disp_fwd) < int'(DL)) && (cand[disp_fwd] == disp_fwd);

  initial assert (DL >= 2) else $error("lr_check: DL must be at least 2");

endmodule
