// Self-checking test of the squarer/adder: for random I and Q values, the
// extremes included, the output must be I*I + Q*Q, one cycle after
// in_valid.
module tb_energy_sum;
  localparam int AW = 19, EW = 2*AW + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [AW-1:0] i_in, q_in;
  logic [EW-1:0] energy;
  logic out_valid;
  int checks = 0, failures = 0;

  energy_sum #(.AW(AW), .EW(EW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    in_valid = 0; i_in = '0; q_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      longint a, b, e;
      a = (k == 0) ? -(longint'(1) << (AW-1)) : longint'($urandom_range(2**AW - 1, 0)) - 2**(AW-1);
      b = (k == 0) ? -(longint'(1) << (AW-1)) : longint'($urandom_range(2**AW - 1, 0)) - 2**(AW-1);
      e = a*a + b*b;
      in_valid = 1; i_in = AW'(a); q_in = AW'(b);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(energy) != e) begin
        failures++;
        $display("FAIL: %0d^2+%0d^2 = %0d, got %0d (valid %0d)", a, b, e, energy, out_valid);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
