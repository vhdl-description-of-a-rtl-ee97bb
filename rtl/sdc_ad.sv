// sdc_ad: AD block of a Stereo Disparity Correlator.
//
// Registers the absolute intensity differences of two pixel pairs: the head
// pair (pixels entering the correlation window) and the tail pair (pixels
// leaving it), c = |I_ref - I_cross|. One pair of results per accepted
// input; `out_valid` follows `in_valid` by one cycle. The single register
// stage is a choice of this design.
module sdc_ad
  import rtsvp_pkg::*;
#(
  parameter int unsigned IB = DEF_IB
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IB-1:0] ref_head,
  input  logic [IB-1:0] cross_head,
  input  logic [IB-1:0] ref_tail,
  input  logic [IB-1:0] cross_tail,
  output logic          out_valid,
  output logic [IB-1:0] ad_head,
  output logic [IB-1:0] ad_tail
);

  function automatic logic [IB-1:0] absdiff(logic [IB-1:0] a, logic [IB-1:0] b);
    return (a >= b) ? a - b : b - a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ad_head   <= '0;
      ad_tail   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ad_head <= absdiff(ref_head, cross_head);
        ad_tail <= absdiff(ref_tail, cross_tail);
      end
    end
  end

endmodule
