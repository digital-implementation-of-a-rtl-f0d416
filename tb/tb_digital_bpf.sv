// Self-checking test of the digital bandpass: random samples must give
// y[n] = x[n] - x[n-2] one cycle later, a constant (DC) input must give
// zero and a full-scale subcarrier at fs/16 must pass with a peak gain of
// about 2*sin(2*pi/16) = 0.765.
module tb_digital_bpf;
  localparam int IW = 10, OW = IW + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [IW-1:0] din;
  logic signed [OW-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  int hist [3];

  digital_bpf #(.IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  task automatic push(int x);
    in_valid = 1; din = IW'(x);
    hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = x;
    @(negedge clk);
  endtask

  initial begin
    int peak;
    in_valid = 0; din = '0; hist = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      push(int'($urandom_range(2**IW - 1, 0)) - 2**(IW-1));
      checks++;
      if (!dout_valid || int'(dout) != hist[0] - hist[2]) begin
        failures++; $display("FAIL: y=%0d expected %0d", dout, hist[0] - hist[2]);
      end
    end
    for (int k = 0; k < 10; k++) push(300);
    checks++;
    if (dout != 0) begin failures++; $display("FAIL: DC not removed (%0d)", dout); end
    peak = 0;
    for (int k = 0; k < 64; k++) begin
      push(int'(500.0 * $sin(2.0 * 3.14159265 * (real'(k) + 0.5) / 16.0)));
      if (k > 4 && int'(dout) > peak) peak = int'(dout);
    end
    checks++;
    if (peak < 370 || peak > 395) begin failures++; $display("FAIL: subcarrier gain, peak %0d", peak); end
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
