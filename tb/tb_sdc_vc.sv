// Testbench for sdc_vc: random head/tail differences and column-sum feedback
// chosen so that the true update stays in range; checks the combinational
// write-back sum and the registered column sum one cycle later.
module tb_sdc_vc;
  localparam int IB = 8, WM = 5;
  localparam int VW = IB + $clog2(2 * WM + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid, out_valid;
  logic [IB-1:0] ad_head, ad_tail;
  logic [VW-1:0] vc_fb, vc_sum, vc;

  sdc_vc #(.IB(IB), .WM(WM)) dut (
    .clk, .rst_n, .in_valid, .ad_head, .ad_tail, .vc_fb, .vc_sum, .out_valid, .vc
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum, prev_exp;
    bit pend;
    in_valid = 0; ad_head = 0; ad_tail = 0; vc_fb = 0; pend = 0; prev_exp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (vc !== VW'(prev_exp) || !out_valid) begin
          failures++;
          if (failures < 10) $display("t=%0d vc got %0d exp %0d", t, vc, prev_exp);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      ad_head  = IB'($urandom);
      // The tail difference is one of the 2m+1 terms already in the feedback sum.
      ad_tail  = IB'($urandom);
      vc_fb    = VW'(int'(ad_tail) + $urandom_range(0, 2 * WM * ((1 << IB) - 1)));
      exp_sum  = int'(vc_fb) + int'(ad_head) - int'(ad_tail);
      #1;
      checks++;
      if (vc_sum !== VW'(exp_sum)) begin
        failures++;
        if (failures < 10) $display("t=%0d vc_sum got %0d exp %0d", t, vc_sum, exp_sum);
      end
      pend = in_valid;
      if (in_valid) prev_exp = exp_sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
