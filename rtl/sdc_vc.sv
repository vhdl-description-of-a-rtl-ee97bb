// sdc_vc: VC block of a Stereo Disparity Correlator (column sum).
//
// Implements VC(x,y,d) = VC(x,y-1,d) + c(x,y+m,d) - c(x,y-m-1,d): the sum of
// the 2m+1 absolute differences in one window column is updated from the same
// column's sum one line earlier (`vc_fb`, read from the line FIFO outside this
// block) by adding the difference entering the window (`ad_head`) and
// subtracting the one leaving it (`ad_tail`).
//
// `vc_sum` is the new sum, combinational, for writing back into the line
// FIFO in the same cycle; `vc` is the registered copy for the C block, valid
// one cycle after `in_valid`. The sum is VW = I_B + log2(2m+1) bits; the
// intermediate add and subtract wrap modulo 2^VW, which is exact because the
// true result always fits. The recursion and the width follow the
// architecture; the split of combinational and registered outputs is a
// choice of this design.
module sdc_vc
  import rtsvp_pkg::*;
#(
  parameter int unsigned IB = DEF_IB,
  parameter int unsigned WM = DEF_WM,
  localparam int unsigned VW = vc_width(IB, WM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IB-1:0] ad_head,
  input  logic [IB-1:0] ad_tail,
  input  logic [VW-1:0] vc_fb,
  output logic [VW-1:0] vc_sum,
  output logic          out_valid,
  output logic [VW-1:0] vc
);

  assign vc_sum = vc_fb + VW'(ad_head) - VW'(ad_tail);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      vc        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) vc <= vc_sum;
    end
  end

endmodule
