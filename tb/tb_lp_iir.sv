// Self-checking test of the cascaded first-order IIR low-pass.
// 1. Against a reference written with real numbers: each section follows
//    y += (x - y) / 2**shift; the RTL's fixed-point result must stay within
//    two units of the reference for random inputs and every shift 0..4.
// 2. Step response: a constant input must be reached (DC gain one) and
//    shift 0 must pass the input straight through.
// 3. Latency: dout_valid exactly one cycle after in_valid.
module tb_lp_iir;
  localparam int AW = 19, FRAC = 8, ORDER = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [AW-1:0] din;
  logic [2:0] shift;
  logic signed [AW-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  real ref_y [ORDER];
  bit  v_d;

  lp_iir #(.AW(AW), .FRAC(FRAC), .ORDER(ORDER), .SHW(3)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    v_d <= in_valid;
    if (rst_n && (dout_valid != v_d)) begin
      checks++; failures++;
      $display("FAIL: latency");
    end
  end

  task automatic step_ref(int x);
    real xin;
    xin = real'(x);
    for (int k = 0; k < ORDER; k++) begin
      ref_y[k] = ref_y[k] + (xin - ref_y[k]) / real'(2 ** shift);
      xin = ref_y[k];
    end
  endtask

  task automatic push(int x);
    in_valid = 1; din = AW'(x);
    step_ref(x);
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if ((real'(dout) - ref_y[ORDER-1]) > 2.0 || (ref_y[ORDER-1] - real'(dout)) > 2.0) begin
      failures++;
      $display("FAIL: shift %0d dout %0d reference %f", shift, dout, ref_y[ORDER-1]);
    end
  endtask

  initial begin
    in_valid = 0; din = '0; shift = 0;
    foreach (ref_y[k]) ref_y[k] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // shift 0: pass-through
    for (int k = 0; k < 20; k++) begin
      int x;
      x = int'($urandom_range(200000, 0)) - 100000;
      push(x);
      checks++;
      if (int'(dout) != x) begin failures++; $display("FAIL: shift 0 not a pass-through"); end
    end
    for (int s = 1; s <= 4; s++) begin
      shift = 3'(s);
      for (int k = 0; k < 200; k++) push(int'($urandom_range(200000, 0)) - 100000);
      // step to a constant: settles to it
      for (int k = 0; k < 40 * (1 << s); k++) push(54321);
      checks++;
      if (int'(dout) < 54321 - 2 || int'(dout) > 54321) begin
        failures++; $display("FAIL: DC gain, shift %0d settles at %0d", s, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
