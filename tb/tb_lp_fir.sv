// Self-checking test of the integrate-and-dump LP FIR: random samples,
// windows of 15, 16 and 17 samples (a local period as corrected by the
// phase controller) and occasional idle cycles. Each output must equal the
// sum of the samples of its window and appear exactly one cycle after the
// dump strobe.
module tb_lp_fir;
  localparam int DW = 12;
  localparam int AW = 19;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, dump;
  logic signed [DW-1:0] din;
  logic signed [AW-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int expect_q [$];
  bit dump_d;

  lp_fir #(.DW(DW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    dump_d <= dump;
    if (rst_n) begin
      if (dout_valid != dump_d) begin
        checks++; failures++;
        $display("FAIL: output valid not one cycle after dump");
      end
      if (dout_valid) begin
        int e;
        e = expect_q.pop_front();
        checks++;
        if (int'(dout) != e) begin
          failures++;
          $display("FAIL: sum %0d expected %0d", dout, e);
        end
      end
    end
  end

  initial begin
    int sum;
    in_valid = 0; dump = 0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      int len;
      len = 15 + int'($urandom_range(2, 0));
      sum = 0;
      for (int k = 0; k < len; k++) begin
        int x;
        if ($urandom_range(9, 0) == 0) begin
          in_valid = 0; dump = 0; din = DW'($urandom);
          @(negedge clk);
        end
        x = (w < 10) ? 2**(DW-1) - 1 : int'($urandom_range(2**DW - 1, 0)) - 2**(DW-1);
        in_valid = 1; din = DW'(x); dump = (k == len - 1);
        sum += x;
        if (dump) expect_q.push_back(sum);
        @(negedge clk);
      end
    end
    in_valid = 0; dump = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
