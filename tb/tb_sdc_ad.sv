// Testbench for sdc_ad: random pixel pairs (including equal pairs and the
// extremes) with random gaps; the registered head and tail absolute
// differences are compared one cycle later with |a - b| computed here.
module tb_sdc_ad;
  localparam int IB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          in_valid, out_valid;
  logic [IB-1:0] rh, ch, rt, ct, ad_head, ad_tail;

  sdc_ad #(.IB(IB)) dut (
    .clk, .rst_n, .in_valid, .ref_head(rh), .cross_head(ch), .ref_tail(rt), .cross_tail(ct),
    .out_valid, .ad_head, .ad_tail
  );

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic logic [IB-1:0] pick();
    case ($urandom_range(0, 5))
      0: return '0;
      1: return '1;
      default: return IB'($urandom);
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_h, exp_t;
    bit pend;
    in_valid = 0; rh = 0; ch = 0; rt = 0; ct = 0; pend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // Check what the previous cycle registered.
      checks++;
      if (out_valid !== pend) begin
        failures++;
        $display("valid mismatch t=%0d", t);
      end
      if (pend) begin
        checks++;
        if (ad_head !== IB'(exp_h) || ad_tail !== IB'(exp_t)) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d/%0d exp %0d/%0d", t, ad_head, ad_tail, exp_h, exp_t);
        end
      end
      in_valid = ($urandom_range(0, 4) != 0);
      rh = pick(); ch = ($urandom_range(0, 7) == 0) ? rh : pick();
      rt = pick(); ct = pick();
      pend = in_valid;
      exp_h = iabs(int'(rh) - int'(ch));
      exp_t = iabs(int'(rt) - int'(ct));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
