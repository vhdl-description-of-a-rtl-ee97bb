// Testbench for sdc_c: a random stream of column sums; the column leaving
// the window is taken from this testbench's own history (2n+1 columns back),
// so the window register must equal the plain sum of the last 2n+1 column
// sums, and the reduced output that sum shifted right by CW - OW bits.
module tb_sdc_c;
  localparam int IB = 8, WM = 5, WN = 5, OW = 8;
  localparam int VW = IB + $clog2(2 * WM + 1);
  localparam int CW = IB + $clog2((2 * WN + 1) * (2 * WM + 1));
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid, out_valid;
  logic [VW-1:0] vc_new, vc_old;
  logic [CW-1:0] c_full;
  logic [OW-1:0] c_red;

  sdc_c #(.IB(IB), .WM(WM), .WN(WN), .OW(OW)) dut (
    .clk, .rst_n, .in_valid, .vc_new, .vc_old, .out_valid, .c_full, .c_red
  );

  int hist [$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    bit pend;
    in_valid = 0; vc_new = 0; vc_old = 0; pend = 0; exp_c = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== pend) failures++;
      if (pend) begin
        checks++;
        if (c_full !== CW'(exp_c) || c_red !== OW'(exp_c >> (CW - OW))) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d/%0d exp %0d", t, c_full, c_red, exp_c);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      // Mostly large column sums, so the window sum reaches its top bits.
      vc_new = VW'($urandom_range((t % 500 < 250) ? 2000 : 0, (2 * WM + 1) * ((1 << IB) - 1)));
      vc_old = (hist.size() >= 2 * WN + 1) ? VW'(hist[hist.size() - (2 * WN + 1)]) : '0;
      pend = in_valid;
      if (in_valid) begin
        hist.push_back(int'(vc_new));
        exp_c = 0;
        for (int i = 0; i < 2 * WN + 1 && i < hist.size(); i++) exp_c += hist[hist.size() - 1 - i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
