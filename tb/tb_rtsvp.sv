// End-to-end testbench for rtsvp at reduced size (16x12 frames, 8
// disparities, 3x5 window). A synthetic stereo scene is generated on the fly:
// a pseudo-random texture for the left image and a right image made from it
// by shifting each line by a known disparity (a background plane and a
// nearer square). Two processors run side by side: one with the displaced
// pixel taken ahead of the reference (c = |L(x) - R(x+d)|), one behind
// (c = |L(x) - R(x-d)|). Each output is compared with a direct evaluation of
// the window sums, the bit reduction and the minimum search (lowest
// disparity on ties), including its centre coordinates; the output must
// follow its input by exactly 7 cycles (1 + 3 + log2(8)).
// A third processor has the left-right check built in: its disparities must
// equal the first one's, and its consistency flag must equal
// d_R(p + d_L(p)) == d_L(p), with d_R the directly evaluated disparity map
// that uses the right image as reference.
// Mechanisms counted, each must occur: input gaps (blanking), frame
// wrap-around, ties in the minimum search, disparity 0, disparity D_L-1,
// outputs that agree with the scene's true disparity, and left-right checks
// that pass and that fail.
module tb_rtsvp;
  localparam int IB = 8, DL = 8, N = 16, M = 12, WM = 1, WN = 2, OW = 8;
  localparam int FRAMES = 4;
  localparam int PIPE = 1 + 3 + $clog2(DL);
  localparam int CW = IB + $clog2((2 * WN + 1) * (2 * WM + 1));
  localparam int DW = $clog2(DL);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid;
  logic [IB-1:0] pix_l, pix_r;
  logic          ov [2];
  logic [DW-1:0] disp [2];
  logic [OW-1:0] corr [2];
  logic [3:0]    ox [2];
  logic [3:0]    oy [2];
  logic          lr_ok [3];
  logic          ov_c;
  logic [DW-1:0] disp_c;

  rtsvp #(.IB(IB), .DL(DL), .N(N), .M(M), .WM(WM), .WN(WN), .OW(OW), .CROSS_AHEAD(1'b1)) dut_a (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(ov[0]), .disp(disp[0]), .out_corr(corr[0]), .out_x(ox[0]), .out_y(oy[0]),
    .lr_ok(lr_ok[0])
  );
  rtsvp #(.IB(IB), .DL(DL), .N(N), .M(M), .WM(WM), .WN(WN), .OW(OW), .CROSS_AHEAD(1'b0)) dut_b (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(ov[1]), .disp(disp[1]), .out_corr(corr[1]), .out_x(ox[1]), .out_y(oy[1]),
    .lr_ok(lr_ok[1])
  );
  rtsvp #(.IB(IB), .DL(DL), .N(N), .M(M), .WM(WM), .WN(WN), .OW(OW), .CROSS_AHEAD(1'b1), .LR_CHECK(1'b1)) dut_c (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(ov_c), .disp(disp_c), .out_corr(), .out_x(), .out_y(), .lr_ok(lr_ok[2])
  );

  // ------------------------------------------------------------ scene
  function automatic int texture(int k);
    int unsigned h = int'(k) * 32'h9e3779b1;
    h = h ^ (h >> 15);
    h = h * 32'h85ebca6b;
    return int'((h >> 13) & 32'hff);
  endfunction

  // True disparity at (x, y): a nearer square in the middle, background elsewhere.
  function automatic int true_disp(int x, int y);
    return (x >= N / 4 && x < 3 * N / 4 && y >= M / 4 && y < 3 * M / 4) ? DL - 2 : 2;
  endfunction

  function automatic int lpix(int k);
    return (k < 0) ? 0 : texture(k);
  endfunction

  // R(x) = L(x - d): the right image is the left one displaced by d.
  function automatic int rpix(int k);
    int x, y, d;
    if (k < 0) return 0;
    x = k % N; y = (k / N) % M;
    d = true_disp(x, y);
    return (x - d >= 0) ? texture(k - d) : texture(k + 7919 * N * M);
  endfunction

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Reference result for output j of processor `ahead`: disparity and reduced SAD.
  task automatic model(input int j, input bit ahead, output int md, output int mv, output bit tie);
    int lat = WN + WM * N + (ahead ? DL - 1 : 0);
    int c0 = j - lat;
    mv = 1 << 30; md = 0; tie = 0;
    for (int d = 0; d < DL; d++) begin
      int s = 0;
      for (int jj = -WM; jj <= WM; jj++)
        for (int i = -WN; i <= WN; i++) begin
          int p = c0 + i + jj * N;
          s += absd(lpix(p), rpix(ahead ? p + d : p - d));
        end
      s = s >> (CW - OW);
      if (s < mv) begin mv = s; md = d; tie = 0; end
      else if (s == mv) tie = 1;
    end
  endtask

  // Reverse map: disparity at right-image centre q (right image as reference,
  // left pixel d to the left); 0 before the first reverse result.
  function automatic int rev_model(int q);
    int mv = 1 << 30, md = 0;
    if (q < -(WN + WM * N)) return 0;
    for (int d = 0; d < DL; d++) begin
      int s = 0;
      for (int jj = -WM; jj <= WM; jj++)
        for (int i = -WN; i <= WN; i++) begin
          int p = q + i + jj * N;
          s += absd(rpix(p), lpix(p - d));
        end
      s = s >> (CW - OW);
      if (s < mv) begin mv = s; md = d; end
    end
    return md;
  endfunction

  // ------------------------------------------------------------ counters
  int n_lr_ok = 0, n_lr_bad = 0;
  int n_gap = 0, n_wrap = 0, n_tie = 0, n_d0 = 0, n_dmax = 0, n_gt = 0, n_interior = 0;
  int nout [2] = '{0, 0};
  int nin = 0;
  bit vhist [$];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    total = FRAMES * N * M;
    in_valid = 0; pix_l = 0; pix_r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; nout[0] < total || nout[1] < total; t++) begin
      @(negedge clk);
      // Output checks for both processors.
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (ov[u] !== (vhist.size() >= PIPE && vhist[vhist.size() - PIPE])) begin
          failures++;
          if (failures < 10) $display("dut%0d: out_valid not %0d cycles after input (t=%0d)", u, PIPE, t);
        end
        if (ov[u]) begin
          int md, mv, c0, cx, cy;
          bit tie;
          model(nout[u], u == 0, md, mv, tie);
          c0 = nout[u] - (WN + WM * N + (u == 0 ? DL - 1 : 0));
          c0 = ((c0 % (N * M)) + N * M) % (N * M);
          cx = c0 % N; cy = c0 / N;
          checks++;
          if (int'(disp[u]) != md || int'(corr[u]) != mv || int'(ox[u]) != cx || int'(oy[u]) != cy) begin
            failures++;
            if (failures < 10)
              $display("dut%0d out %0d: got d=%0d c=%0d (%0d,%0d) exp d=%0d c=%0d (%0d,%0d)",
                       u, nout[u], disp[u], corr[u], ox[u], oy[u], md, mv, cx, cy);
          end
          if (u == 0) begin
            automatic int p = nout[0] - (WN + WM * N + DL - 1);
            automatic bit exp_lr = (rev_model(p + md) == md);
            checks += 2;
            if (lr_ok[0] !== 1'b1) failures++;
            if (ov_c !== 1'b1 || int'(disp_c) != md || lr_ok[2] !== exp_lr) begin
              failures++;
              if (failures < 10) $display("lr: out %0d d=%0d/%0d lr_ok=%0d exp %0d", nout[0], disp_c, md, lr_ok[2], exp_lr);
            end
            if (exp_lr) n_lr_ok++; else n_lr_bad++;
            if (tie) n_tie++;
            if (md == 0) n_d0++;
            if (md == DL - 1) n_dmax++;
            if (ox[0] == 4'(N - 1) && oy[0] == 4'(M - 1)) n_wrap++;
            if (nout[0] >= WN + WM * N + DL - 1 && cx >= WN + DL && cx < N - WN && cy >= WM && cy < M - WM) begin
              n_interior++;
              if (md == true_disp(cx, cy)) n_gt++;
            end
          end
          nout[u]++;
        end
      end
      // Next input: blanking gaps at the end of every line plus random gaps.
      in_valid = (nin < total + 2 * N * M) && !((nin % N == 0) && ($urandom_range(0, 1) == 0))
                 && ($urandom_range(0, 9) != 0);
      if (!in_valid) n_gap++;
      pix_l = IB'(lpix(nin));
      pix_r = IB'(rpix(nin));
      vhist.push_back(in_valid);
      if (in_valid) nin++;
    end
    checks += 8;
    if (n_lr_ok == 0)  begin failures++; $display("left-right check never passed"); end
    if (n_lr_bad == 0) begin failures++; $display("left-right check never failed"); end
    if (n_gap == 0)  begin failures++; $display("no input gap"); end
    if (n_wrap < FRAMES - 1) begin failures++; $display("frame wrap seen %0d times", n_wrap); end
    if (n_tie == 0)  begin failures++; $display("no tie in the minimum search"); end
    if (n_d0 == 0)   begin failures++; $display("disparity 0 never chosen"); end
    if (n_dmax == 0) begin failures++; $display("disparity D_L-1 never chosen"); end
    if (n_gt * 2 < n_interior) begin failures++; $display("true disparity found %0d of %0d", n_gt, n_interior); end
    $display("gaps=%0d wraps=%0d ties=%0d d0=%0d dmax=%0d true=%0d/%0d lr_ok=%0d lr_fail=%0d",
             n_gap, n_wrap, n_tie, n_d0, n_dmax, n_gt, n_interior, n_lr_ok, n_lr_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
