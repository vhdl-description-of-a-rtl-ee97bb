// Testbench for lr_check: random forward and reverse disparity streams
// (small values, so both agreeing and disagreeing pairs are frequent) with
// random gaps. The reverse stream runs DL-1 pixels ahead of the forward one;
// for forward pixel p the expected flag is rev(p + fwd(p)) == fwd(p), with
// reverse disparities before the first one counting as 0.
module tb_lr_check;
  localparam int DL = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       in_valid, lr_ok;
  logic [2:0] disp_fwd, disp_rev;

  lr_check #(.DL(DL)) dut (.clk, .rst_n, .in_valid, .disp_fwd, .disp_rev, .lr_ok);

  int revs [$];
  int n_ok = 0, n_bad = 0;

  function automatic int rev_at(int x);
    int i = x - (DL - 1);
    return (i >= 0 && i < revs.size()) ? revs[i] : 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; disp_fwd = 0; disp_rev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3000; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      disp_fwd = 3'($urandom_range(0, 3) + (($urandom_range(0, 9) == 0) ? 4 : 0));
      disp_rev = 3'($urandom_range(0, 3));
      if (in_valid) begin
        bit exp;
        revs.push_back(int'(disp_rev));
        exp = (rev_at(p + int'(disp_fwd)) == int'(disp_fwd));
        #1;
        checks++;
        if (lr_ok !== exp) begin
          failures++;
          if (failures < 10) $display("p=%0d fwd=%0d got %0d exp %0d", p, disp_fwd, lr_ok, exp);
        end
        if (exp) n_ok++; else n_bad++;
        p++;
      end
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) begin failures++; $display("only one outcome exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
