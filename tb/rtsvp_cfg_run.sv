// rtsvp_cfg_run: drives one rtsvp of a given configuration with a generated
// stereo scene and checks it; used by tb_rtsvp_configs to run several
// published configurations side by side.
//
// The scene is a pseudo-random IB-bit texture; the right image is the left
// one displaced by a background disparity and, in a nearer square, by
// DL-2. LINES lines are fed (with random gaps), then the pipeline is
// flushed. Every STRIDE-th result is compared with a direct SAD evaluation
// (window sums, shift to OW = IB bits, lowest-disparity minimum, centre
// coordinates); `done` rises when all results of the fed lines are out.
// The count of results matching the scene's true disparity inside the image
// is reported as well.
module rtsvp_cfg_run #(
  parameter int IB = 8, DL = 32, N = 256, M = 256, WM = 5, WN = 5,
  parameter int LINES = 256, STRIDE = 1, SEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   gt_hits,
  output int   gt_total
);
  localparam int CW = IB + $clog2((2 * WN + 1) * (2 * WM + 1));
  localparam int DW = $clog2(DL);
  localparam int XW = $clog2(N), YW = $clog2(M);
  localparam int LAT = WN + WM * N + DL - 1;
  localparam int PIPE = 1 + 3 + $clog2(DL);

  logic          in_valid;
  logic [IB-1:0] pix_l, pix_r;
  logic          out_valid, lr_ok_unused;
  logic [DW-1:0] disp;
  logic [IB-1:0] out_corr;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;

  rtsvp #(.IB(IB), .DL(DL), .N(N), .M(M), .WM(WM), .WN(WN)) dut (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid, .disp, .out_corr, .out_x, .out_y, .lr_ok(lr_ok_unused)
  );

  function automatic int texture(int k);
    int unsigned h = int'(k) * 32'h9e3779b1 + int'(SEED) * 32'h27d4eb2f;
    h = h ^ (h >> 15);
    h = h * 32'h85ebca6b;
    return int'((h >> 13) & ((32'd1 << IB) - 1));
  endfunction

  function automatic int true_disp(int x, int y);
    return (x >= N / 4 && x < 3 * N / 4 && y >= M / 4 && y < 3 * M / 4) ? DL - 2 : 2;
  endfunction

  function automatic int lpix(int k);
    return (k < 0) ? 0 : texture(k);
  endfunction

  function automatic int rpix(int k);
    int x, y, d;
    if (k < 0) return 0;
    x = k % N; y = (k / N) % M;
    d = true_disp(x, y);
    return (x - d >= 0) ? texture(k - d) : texture(k + 7919 * N * M);
  endfunction

  task automatic model(input int j, output int md, output int mv);
    int c0 = j - LAT;
    mv = 1 << 30; md = 0;
    for (int d = 0; d < DL; d++) begin
      int s = 0;
      for (int jj = -WM; jj <= WM; jj++)
        for (int i = -WN; i <= WN; i++) begin
          int p = c0 + i + jj * N;
          int a = lpix(p), b = rpix(p + d);
          s += (a > b) ? a - b : b - a;
        end
      s = s >> (CW - IB);
      if (s < mv) begin mv = s; md = d; end
    end
  endtask

  initial begin
    int nin, nout, total;
    bit vhist [$];
    checks = 0; failures = 0; gt_hits = 0; gt_total = 0; done = 0;
    in_valid = 0; pix_l = 0; pix_r = 0;
    nin = 0; nout = 0;
    total = LINES * N;
    @(posedge rst_n);
    while (nout < total) begin
      @(negedge clk);
      checks++;
      if (out_valid !== (vhist.size() >= PIPE && vhist[vhist.size() - PIPE])) failures++;
      if (out_valid) begin
        if (nout % STRIDE == 0) begin
          int md, mv, c0;
          model(nout, md, mv);
          c0 = ((nout - LAT) % (N * M) + N * M) % (N * M);
          checks++;
          if (int'(disp) != md || int'(out_corr) != mv || int'(out_x) != c0 % N || int'(out_y) != c0 / N) begin
            failures++;
            if (failures < 5)
              $display("cfg IB=%0d DL=%0d N=%0d m=%0d: out %0d got d=%0d c=%0d exp d=%0d c=%0d",
                       IB, DL, N, WM, nout, disp, out_corr, md, mv);
          end
          if (nout >= LAT && c0 % N >= WN + DL && c0 % N < N - WN && c0 / N >= WM && c0 / N < M - WM) begin
            gt_total++;
            if (md == true_disp(c0 % N, c0 / N)) gt_hits++;
          end
        end
        nout++;
      end
      in_valid = (nin < total + LAT) && ($urandom_range(0, 7) != 0);
      pix_l = IB'(lpix(nin));
      pix_r = IB'(rpix(nin));
      vhist.push_back(in_valid);
      if (in_valid) nin++;
    end
    done = 1;
  end
endmodule
