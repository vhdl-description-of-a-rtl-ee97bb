// Full-size testbench for rtsvp: the processor with its default
// configuration (256x256 frames, 32 disparities, 11x11 window, 8-bit pixels)
// takes one complete frame of a generated stereo scene (pseudo-random
// texture, right image displaced by a background disparity and by a nearer
// square), with blanking gaps. Every output is compared with a direct
// evaluation of the 32 window sums, the bit reduction and the minimum search,
// including its centre coordinates; the valid pattern of every output must
// follow the input by 9 cycles (1 + 3 + log2(32)). It also reports how often
// the true disparity of the scene is found inside the image.
module tb_rtsvp_full;
  localparam int IB = 8, DL = 32, N = 256, M = 256, WM = 5, WN = 5, OW = 8;
  localparam int FRAMES = 1;
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
  logic [7:0]    ox [2];
  logic [7:0]    oy [2];
  logic          lr_ok_unused;

  rtsvp dut (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(ov[0]), .disp(disp[0]), .out_corr(corr[0]), .out_x(ox[0]), .out_y(oy[0]),
    .lr_ok(lr_ok_unused)
  );
  assign ov[1] = 1'b0;
  assign disp[1] = '0;
  assign corr[1] = '0;
  assign ox[1] = '0;
  assign oy[1] = '0;

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

  // ------------------------------------------------------------ counters
  int n_gap = 0, n_wrap = 0, n_tie = 0, n_d0 = 0, n_dmax = 0, n_gt = 0, n_interior = 0;
  int nout [2] = '{0, 0};
  int nin = 0;
  bit vhist [$];

  initial begin
    repeat (200000) @(posedge clk);
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
    for (int t = 0; nout[0] < total; t++) begin
      @(negedge clk);
      // Output checks for both processors.
      for (int u = 0; u < 1; u++) begin
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
            if (tie) n_tie++;
            if (md == 0) n_d0++;
            if (md == DL - 1) n_dmax++;
            if (ox[0] == 8'(N - 1) && oy[0] == 8'(M - 1)) n_wrap++;
            if (nout[0] >= WN + WM * N + DL - 1 && cx >= WN + DL && cx < N - WN && cy >= WM && cy < M - WM) begin
              n_interior++;
              if (md == true_disp(cx, cy)) n_gt++;
            end
          end
          nout[u]++;
        end
      end
      // Next input: blanking gaps at the end of every line plus random gaps.
      in_valid = (nin < total + 2 * N * WM + 2 * N) && !((nin % N == 0) && ($urandom_range(0, 1) == 0))
                 && ($urandom_range(0, 9) != 0);
      if (!in_valid) n_gap++;
      pix_l = IB'(lpix(nin));
      pix_r = IB'(rpix(nin));
      vhist.push_back(in_valid);
      if (in_valid) nin++;
    end
    checks += 2;
    if (n_gap == 0)  begin failures++; $display("no input gap"); end
    if (n_gt * 2 < n_interior) begin failures++; $display("true disparity found %0d of %0d", n_gt, n_interior); end
    $display("gaps=%0d wraps=%0d ties=%0d d0=%0d dmax=%0d true=%0d/%0d",
             n_gap, n_wrap, n_tie, n_d0, n_dmax, n_gt, n_interior);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
