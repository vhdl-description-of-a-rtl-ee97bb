// dc: Disparity Comparator.
//
// Receives the D_L correlation values of one pixel, one from each disparity
// correlator, and returns the disparity with the smallest value
// (delta = argmin_d C(d)). It is a pipelined binary tree of compare-select
// nodes: each level halves the number of candidates and registers the
// surviving value together with its disparity index, so the comparator runs
// at the pixel clock for any D_L. Inputs are padded to a power of two with
// all-ones values that never win. On equal values the lower disparity wins.
//
// Timing: `out_valid` follows `in_valid` by log2(D_L) cycles (rounded up,
// at least one); one result per accepted input.
// The minimum search follows the architecture; the tree form and the
// tie rule are choices of this design.
module dc
  import rtsvp_pkg::*;
#(
  parameter int unsigned DL = DEF_DL,
  parameter int unsigned OW = DEF_IB,
  localparam int unsigned DW = disp_width(DL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [OW-1:0] corr [DL],
  output logic          out_valid,
  output logic [DW-1:0] disp,
  output logic [OW-1:0] min_corr
);

  localparam int unsigned LEVELS = (DL > 1) ? $clog2(DL) : 1;
  localparam int unsigned P      = 1 << LEVELS;

  // Padded input candidates.
  logic [OW-1:0] in_val [P];
  // Level l (1 .. LEVELS) of the tree keeps P >> l candidates in entries 0 .. (P >> l) - 1.
  logic [OW-1:0] val [1:LEVELS][P];
  logic [DW-1:0] idx [1:LEVELS][P];
  logic          vld [1:LEVELS];

  always_comb begin
    for (int k = 0; k < int'(P); k++) in_val[k] = (k < int'(DL)) ? corr[k] : '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l <= int'(LEVELS); l++) begin
        vld[l] <= 1'b0;
        for (int k = 0; k < int'(P); k++) begin
          val[l][k] <= '0;
          idx[l][k] <= '0;
        end
      end
    end else begin
      vld[1] <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < int'(P / 2); k++) begin
          if (in_val[2*k+1] < in_val[2*k]) begin
            val[1][k] <= in_val[2*k+1];
            idx[1][k] <= DW'(2*k+1);
          end else begin
            val[1][k] <= in_val[2*k];
            idx[1][k] <= DW'(2*k);
          end
        end
      end
      for (int l = 2; l <= int'(LEVELS); l++) begin
        vld[l] <= vld[l-1];
        if (vld[l-1]) begin
          for (int k = 0; k < int'(P >> l); k++) begin
            if (val[l-1][2*k+1] < val[l-1][2*k]) begin
              val[l][k] <= val[l-1][2*k+1];
              idx[l][k] <= idx[l-1][2*k+1];
            end else begin
              val[l][k] <= val[l-1][2*k];
              idx[l][k] <= idx[l-1][2*k];
            end
          end
        end
      end
    end
  end

  assign out_valid = vld[LEVELS];
  assign disp      = idx[LEVELS][0];
  assign min_corr  = val[LEVELS][0];

endmodule
