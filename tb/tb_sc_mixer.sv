// Self-checking test of the sign-flip mixer: for random samples, including
// the most negative one, the output must equal the sample while the clock is
// '1' and its negation while it is '0'.
module tb_sc_mixer;
  localparam int DW = 11;
  logic signed [DW-1:0] din;
  logic                 lo_clk;
  logic signed [DW:0]   dout;
  int checks = 0, failures = 0;

  sc_mixer #(.DW(DW)) dut (.*);

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int x, e;
      x = (k == 0) ? -(1 << (DW-1)) : int'($urandom_range(2**DW - 1, 0)) - 2**(DW-1);
      din = DW'(x);
      lo_clk = (k < 2) ? k[0] : 1'($urandom);
      #1;
      e = lo_clk ? x : -x;
      checks++;
      if (int'(dout) != e) begin
        failures++;
        $display("FAIL: din=%0d lo=%0d dout=%0d expected %0d", x, lo_clk, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
