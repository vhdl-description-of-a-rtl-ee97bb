// Testbench for delay_fifo: random enables and data against a reference
// history; checks that dout is 0 until DEPTH words went in and afterwards
// equals the word taken exactly DEPTH enables earlier. Runs two depths.
module tb_delay_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       en5, en1;
  logic [7:0] din5, din1, dout5, dout1;

  delay_fifo #(.W(8), .DEPTH(5)) dut5 (.clk, .rst_n, .en(en5), .din(din5), .dout(dout5));
  delay_fifo #(.W(8), .DEPTH(1)) dut1 (.clk, .rst_n, .en(en1), .din(din1), .dout(dout1));

  logic [7:0] hist5 [$], hist1 [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en5 = 0; en1 = 0; din5 = 0; din1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en5 = ($urandom_range(0, 3) != 0);
      en1 = ($urandom_range(0, 1) != 0);
      din5 = 8'($urandom);
      din1 = 8'($urandom);
      #1;
      if (en5) begin
        logic [7:0] exp5;
        exp5 = (hist5.size() >= 5) ? hist5[hist5.size() - 5] : 8'h00;
        checks++;
        if (dout5 !== exp5) begin
          failures++;
          if (failures < 10) $display("depth5 t=%0d got %h exp %h", t, dout5, exp5);
        end
        hist5.push_back(din5);
      end
      if (en1) begin
        logic [7:0] exp1;
        exp1 = (hist1.size() >= 1) ? hist1[hist1.size() - 1] : 8'h00;
        checks++;
        if (dout1 !== exp1) begin
          failures++;
          if (failures < 10) $display("depth1 t=%0d got %h exp %h", t, dout1, exp1);
        end
        hist1.push_back(din1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
