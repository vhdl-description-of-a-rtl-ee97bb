// Testbench for dc: random correlation vectors (with forced ties and
// extreme values) for a 32-input and a 5-input comparator; checks the
// minimum, the lowest disparity among equal minima, and the latency of
// log2(D_L) cycles (rounded up) with random gaps in the input.
module tb_dc;
  localparam int OW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid;
  logic [OW-1:0] corr32 [32];
  logic [OW-1:0] corr5  [5];
  logic          v32, v5;
  logic [4:0]    d32;
  logic [2:0]    d5;
  logic [OW-1:0] m32, m5;

  dc #(.DL(32), .OW(OW)) dut32 (.clk, .rst_n, .in_valid, .corr(corr32), .out_valid(v32), .disp(d32), .min_corr(m32));
  dc #(.DL(5),  .OW(OW)) dut5  (.clk, .rst_n, .in_valid, .corr(corr5),  .out_valid(v5),  .disp(d5),  .min_corr(m5));

  // Expected results indexed by the cycle they must appear in.
  int exp_d32 [int], exp_m32 [int], exp_d5 [int], exp_m5 [int];
  int ties = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (corr32[k]) corr32[k] = 0;
    foreach (corr5[k]) corr5[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // Outputs due in this cycle.
      checks += 2;
      if (v32 !== exp_d32.exists(t)) begin failures++; $display("v32 t=%0d", t); end
      if (v5 !== exp_d5.exists(t)) begin failures++; $display("v5 t=%0d", t); end
      if (exp_d32.exists(t)) begin
        checks++;
        if (d32 !== 5'(exp_d32[t]) || m32 !== OW'(exp_m32[t])) begin
          failures++;
          if (failures < 10) $display("dc32 t=%0d got %0d/%0d exp %0d/%0d", t, d32, m32, exp_d32[t], exp_m32[t]);
        end
      end
      if (exp_d5.exists(t)) begin
        checks++;
        if (d5 !== 3'(exp_d5[t]) || m5 !== OW'(exp_m5[t])) begin
          failures++;
          if (failures < 10) $display("dc5 t=%0d got %0d/%0d exp %0d/%0d", t, d5, m5, exp_d5[t], exp_m5[t]);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      begin
        automatic int lo = (t % 3 == 0) ? 250 : 0;
        int mv, md, cnt;
        foreach (corr32[k]) corr32[k] = OW'($urandom_range(lo, 255));
        if (t % 4 == 1) corr32[$urandom_range(0, 31)] = corr32[$urandom_range(0, 31)];
        if (t % 7 == 2) foreach (corr32[k]) corr32[k] = 8'hff;
        foreach (corr5[k]) corr5[k] = OW'($urandom_range(lo, 255));
        if (t % 4 == 3) corr5[$urandom_range(0, 4)] = corr5[$urandom_range(0, 4)];
        if (in_valid) begin
          mv = 1 << OW; md = 0; cnt = 0;
          foreach (corr32[k]) if (int'(corr32[k]) < mv) begin mv = int'(corr32[k]); md = k; end
          foreach (corr32[k]) if (int'(corr32[k]) == mv) cnt++;
          if (cnt > 1) ties++;
          exp_d32[t + 5] = md; exp_m32[t + 5] = mv;
          mv = 1 << OW; md = 0;
          foreach (corr5[k]) if (int'(corr5[k]) < mv) begin mv = int'(corr5[k]); md = k; end
          exp_d5[t + 3] = md; exp_m5[t + 3] = mv;
        end
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
