// Testbench running every published synthesis configuration of the
// processor (pixel bits, disparity limit, line length, window) plus the
// per-channel configuration of a colour system, each as its own rtsvp
// instance driven by rtsvp_cfg_run:
//   IB DL    N   m=n   fed
//    6 16  128   3    one 128x128 frame
//    8 16  128   5    one 128x128 frame
//    6 32  256   3    one 256x256 frame
//    6 32  256   5    one 256x256 frame
//    8 32  256   5    one 256x256 frame
//    8 64  512   5    40 lines of a 512x512 frame
//    8 64 1024   5    24 lines of a 1024x1024 frame
//    8 16  256   5    one 256x256 frame (one colour channel)
// The wide configurations are fed a band of lines, enough to fill their
// (2m+1)-line delays several times over. Results are sampled (every
// STRIDE-th) against a direct SAD evaluation. Passes when every
// configuration is error-free and finds the scene's true disparity for
// most interior pixels.
module tb_rtsvp_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NC = 8;
  logic done [NC];
  int   c [NC], f [NC], gh [NC], gt [NC];

  rtsvp_cfg_run #(.IB(6), .DL(16), .N(128),  .M(128),  .WM(3), .WN(3), .LINES(128), .STRIDE(7),  .SEED(1)) r0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .gt_hits(gh[0]), .gt_total(gt[0]));
  rtsvp_cfg_run #(.IB(8), .DL(16), .N(128),  .M(128),  .WM(5), .WN(5), .LINES(128), .STRIDE(7),  .SEED(2)) r1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .gt_hits(gh[1]), .gt_total(gt[1]));
  rtsvp_cfg_run #(.IB(6), .DL(32), .N(256),  .M(256),  .WM(3), .WN(3), .LINES(256), .STRIDE(29), .SEED(3)) r2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .gt_hits(gh[2]), .gt_total(gt[2]));
  rtsvp_cfg_run #(.IB(6), .DL(32), .N(256),  .M(256),  .WM(5), .WN(5), .LINES(256), .STRIDE(29), .SEED(4)) r3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]), .gt_hits(gh[3]), .gt_total(gt[3]));
  rtsvp_cfg_run #(.IB(8), .DL(32), .N(256),  .M(256),  .WM(5), .WN(5), .LINES(256), .STRIDE(29), .SEED(5)) r4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]), .gt_hits(gh[4]), .gt_total(gt[4]));
  rtsvp_cfg_run #(.IB(8), .DL(64), .N(512),  .M(512),  .WM(5), .WN(5), .LINES(40),  .STRIDE(11), .SEED(6)) r5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]), .gt_hits(gh[5]), .gt_total(gt[5]));
  rtsvp_cfg_run #(.IB(8), .DL(64), .N(1024), .M(1024), .WM(5), .WN(5), .LINES(24),  .STRIDE(13), .SEED(7)) r6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]), .gt_hits(gh[6]), .gt_total(gt[6]));
  rtsvp_cfg_run #(.IB(8), .DL(16), .N(256),  .M(256),  .WM(5), .WN(5), .LINES(256), .STRIDE(29), .SEED(8)) r7 (.clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]), .gt_hits(gh[7]), .gt_total(gt[7]));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1;
      for (int k = 0; k < NC; k++) all &= done[k];
    end while (!all);
    checks = 0; failures = 0;
    for (int k = 0; k < NC; k++) begin
      checks += c[k] + 1;
      failures += f[k];
      // Ground truth is only meaningful inside the image, where the windows are clean.
      if (gt[k] > 0 && gh[k] * 2 < gt[k]) failures++;
      $display("config %0d: checks=%0d failures=%0d true disparity %0d/%0d", k, c[k], f[k], gh[k], gt[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
