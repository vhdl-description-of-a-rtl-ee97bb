// Testbench for sdc: a small correlator (16-pixel lines, 5x3 window) fed
// with two random pixel streams A and B as head pixels and, as the window
// delayers would, the same streams (2m+1) lines earlier as tail pixels.
// For each accepted input k the window sum must equal the directly computed
//   sum_{i=0..2n} sum_{j=0..2m} |A(k-i-jN) - B(k-i-jN)|
// (zero before the first pixel), three cycles later; the reduced output is
// that sum shifted down to OW bits. Streams of equal and of very different
// pixels drive the sum to both ends of its range.
module tb_sdc;
  localparam int IB = 8, N = 16, WM = 2, WN = 1, OW = 8;
  localparam int CW = IB + $clog2((2 * WN + 1) * (2 * WM + 1));
  localparam int LD = (2 * WM + 1) * N;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid, out_valid;
  logic [IB-1:0] rh, ch, rt, ct;
  logic [CW-1:0] c_full;
  logic [OW-1:0] c_red;

  sdc #(.IB(IB), .N(N), .WM(WM), .WN(WN), .OW(OW)) dut (
    .clk, .rst_n, .in_valid, .ref_head(rh), .cross_head(ch), .ref_tail(rt), .cross_tail(ct),
    .out_valid, .c_full, .c_red
  );

  int as [$], bs [$];
  int expq [$];
  bit vpipe [4];

  function automatic int px(ref int q [$], input int k);
    return (k >= 0) ? q[k] : 0;
  endfunction

  function automatic int window_sum(int k);
    int s = 0;
    for (int i = 0; i <= 2 * WN; i++)
      for (int j = 0; j <= 2 * WM; j++) begin
        int p = k - i - j * N;
        int a = px(as, p), b = px(bs, p);
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int maxseen = 0;

  initial begin
    in_valid = 0; rh = 0; ch = 0; rt = 0; ct = 0;
    foreach (vpipe[i]) vpipe[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // Latency: out_valid exactly three cycles after in_valid.
      checks++;
      if (out_valid !== vpipe[2]) begin failures++; $display("latency t=%0d", t); end
      if (out_valid) begin
        automatic int e = expq.pop_front();
        checks++;
        if (c_full !== CW'(e) || c_red !== OW'(e >> (CW - OW))) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d/%0d exp %0d", t, c_full, c_red, e);
        end
        if (e > maxseen) maxseen = e;
      end
      for (int i = 3; i > 0; i--) vpipe[i] = vpipe[i-1];
      in_valid = ($urandom_range(0, 4) != 0);
      vpipe[0] = in_valid;
      begin
        int a, b, k;
        automatic int phase = (t / 400) % 3;
        a = $urandom_range(0, 255);
        b = (phase == 0) ? a : $urandom_range(0, 255);
        if (phase == 1) begin a = $urandom_range(0, 3); b = $urandom_range(252, 255); end
        rh = IB'(a); ch = IB'(b);
        k = as.size();
        rt = IB'(px(as, k - LD)); ct = IB'(px(bs, k - LD));
        if (in_valid) begin
          as.push_back(a); bs.push_back(b);
          expq.push_back(window_sum(k));
        end
      end
    end
    checks++;
    if (maxseen < 200 * (2 * WN + 1) * (2 * WM + 1)) begin
      failures++;
      $display("window sum never reached the top of its range (max %0d)", maxseen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
