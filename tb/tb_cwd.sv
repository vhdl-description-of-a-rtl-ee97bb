// Testbench for cwd: two small window delayers (both displacement
// directions) fed with the same random pixel streams and random gaps. After
// the k-th accepted pair every output must be the stream pixel at a fixed
// offset: reference head L(k-a), reference tail L(k-a-(2m+1)N), and for
// disparity d the crossed head R(k-a+d) (or R(k-d)) and its tail, with
// pixels before the first one counting as 0. The reverse taps (right image
// as reference) are checked the same way: R(k-b) and L(k-b-d) or L(k-b+d).
module tb_cwd;
  localparam int IB = 8, DL = 4, N = 8, WM = 1;
  localparam int LD = (2 * WM + 1) * N;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid;
  logic [IB-1:0] pix_l, pix_r;
  logic          va, vb;
  logic [IB-1:0] rha, rta, rhb, rtb;
  logic [IB-1:0] cha [DL], cta [DL], chb [DL], ctb [DL];
  logic [IB-1:0] xrha, xrta, xrhb, xrtb;
  logic [IB-1:0] xcha [DL], xcta [DL], xchb [DL], xctb [DL];

  cwd #(.IB(IB), .DL(DL), .N(N), .WM(WM), .CROSS_AHEAD(1'b1)) dut_a (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(va), .ref_head(rha), .ref_tail(rta), .cross_head(cha), .cross_tail(cta),
    .rev_ref_head(xrha), .rev_ref_tail(xrta), .rev_cross_head(xcha), .rev_cross_tail(xcta)
  );
  cwd #(.IB(IB), .DL(DL), .N(N), .WM(WM), .CROSS_AHEAD(1'b0)) dut_b (
    .clk, .rst_n, .in_valid, .pix_l, .pix_r,
    .out_valid(vb), .ref_head(rhb), .ref_tail(rtb), .cross_head(chb), .cross_tail(ctb),
    .rev_ref_head(xrhb), .rev_ref_tail(xrtb), .rev_cross_head(xchb), .rev_cross_tail(xctb)
  );

  int ls [$], rs [$];

  function automatic int lpix(int k);
    return (k >= 0 && k < ls.size()) ? ls[k] : 0;
  endfunction
  function automatic int rpix(int k);
    return (k >= 0 && k < rs.size()) ? rs[k] : 0;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s got %0d exp %0d (k=%0d)", what, got, exp, ls.size() - 1);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pend;
    in_valid = 0; pix_l = 0; pix_r = 0; pend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      expect_eq("valid_a", int'(va), int'(pend));
      expect_eq("valid_b", int'(vb), int'(pend));
      if (pend) begin
        automatic int k = ls.size() - 1;
        expect_eq("a.ref_head", int'(rha), lpix(k - (DL - 1)));
        expect_eq("a.ref_tail", int'(rta), lpix(k - (DL - 1) - LD));
        expect_eq("b.ref_head", int'(rhb), lpix(k));
        expect_eq("b.ref_tail", int'(rtb), lpix(k - LD));
        expect_eq("a.rev_ref_head", int'(xrha), rpix(k));
        expect_eq("a.rev_ref_tail", int'(xrta), rpix(k - LD));
        expect_eq("b.rev_ref_head", int'(xrhb), rpix(k - (DL - 1)));
        expect_eq("b.rev_ref_tail", int'(xrtb), rpix(k - (DL - 1) - LD));
        for (int d = 0; d < DL; d++) begin
          expect_eq("a.rev_cross_head", int'(xcha[d]), lpix(k - d));
          expect_eq("a.rev_cross_tail", int'(xcta[d]), lpix(k - d - LD));
          expect_eq("b.rev_cross_head", int'(xchb[d]), lpix(k - (DL - 1) + d));
          expect_eq("b.rev_cross_tail", int'(xctb[d]), lpix(k - (DL - 1) + d - LD));
          expect_eq("a.cross_head", int'(cha[d]), rpix(k - (DL - 1) + d));
          expect_eq("a.cross_tail", int'(cta[d]), rpix(k - (DL - 1) + d - LD));
          expect_eq("b.cross_head", int'(chb[d]), rpix(k - d));
          expect_eq("b.cross_tail", int'(ctb[d]), rpix(k - d - LD));
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      pix_l = IB'($urandom);
      pix_r = IB'($urandom);
      pend = in_valid;
      if (in_valid) begin
        ls.push_back(int'(pix_l));
        rs.push_back(int'(pix_r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
