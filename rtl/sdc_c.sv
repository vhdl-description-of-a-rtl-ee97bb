// sdc_c: C block of a Stereo Disparity Correlator (window sum).
//
// Implements C(x,y,d) = C(x-1,y,d) + VC(x+n,y,d) - VC(x-n-1,y,d): the
// window sum kept in one register is updated each pixel with the column sum
// entering the window (`vc_new`) minus the one that left it, 2n+1 columns
// earlier (`vc_old`, from a column FIFO outside this block). The register is
// CW = I_B + log2((2n+1)(2m+1)) bits wide and zero after reset.
//
// Bit reduction: the correlator output `c_red` is the register shifted right
// by CW - OW bits. With OW = I_B (the default) this is the shift by
// log2((2n+1)(2m+1)) that brings the sum back to pixel width, roughly the
// mean absolute difference; a wider OW keeps more of the sum.
// Timing: `c_full`/`c_red` change one cycle after `in_valid`.
// Recursion, width and the shift follow the architecture; truncation (rather
// than rounding) and the OW parameter are choices of this design.
module sdc_c
  import rtsvp_pkg::*;
#(
  parameter int unsigned IB = DEF_IB,
  parameter int unsigned WM = DEF_WM,
  parameter int unsigned WN = DEF_WN,
  parameter int unsigned OW = IB,
  localparam int unsigned VW = vc_width(IB, WM),
  localparam int unsigned CW = c_width(IB, WM, WN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [VW-1:0] vc_new,
  input  logic [VW-1:0] vc_old,
  output logic          out_valid,
  output logic [CW-1:0] c_full,
  output logic [OW-1:0] c_red
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      c_full    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) c_full <= c_full + CW'(vc_new) - CW'(vc_old);
    end
  end

  assign c_red = c_full[CW-1 -: OW];

  initial assert (OW >= 1 && OW <= CW) else $error("sdc_c: OW must be 1 .. CW");

endmodule
