// Packet error rate of the receiver for ISO/IEC 14443 type B at fc/128
// (106 kbit/s) in additive white Gaussian noise.
//
// Each packet is a pilot, a SOF, 8 random data bytes and 2 further bytes
// (standing for the CRC) as 10-bit characters, and an EOF, rendered by the
// tag signal model on the I channel; the Q channel carries noise only.
// Gaussian noise (Box-Muller from $urandom) is added to every ADC sample.
// With one sample per clock, white noise spans fs/2 = fc/2, so with a
// sine subcarrier of amplitude A and noise deviation sigma:
//   Eb/N0 = (A^2/2 * 128/fc) / (sigma^2 / (fc/2)) = 32 * A^2 / sigma^2.
// A packet counts as received when the I channel reports one start of
// packet and its first 100 output bits equal the 100 character bits.
// The PER at each Eb/N0 point is printed. Checks: no packet may be lost
// without noise, at most 1 of 12 at 19 dB and 4 of 12 at 16 dB, and the PER
// must fall as Eb/N0 rises. Note that the digital band-pass filter
// y = x[n] - x[n-2] has a gain of 0.77 at fc/16 but passes white noise with
// a power gain of 2, so the Eb/N0 after it is 5.3 dB below the value at the
// ADC input quoted here.
module tb_per_14443b;
  import rfid_demod_pkg::*;
  import rfid_tb_pkg::*;

  localparam int ADC_W = 10;
  localparam int AW = ADC_W + 9;
  localparam int EW = 2*AW + 1;
  localparam int AMP = 100;
  localparam int PACKETS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  demod_cfg_t cfg;
  logic adc_valid;
  logic signed [ADC_W-1:0] adc_i, adc_q;
  logic [1:0] bit_valid, bit_value, collision, sop, eop, busy;
  logic [1:0][POS_W-1:0] pos;
  logic [1:0][AW-1:0] i_filt, q_filt;
  logic [1:0][EW-1:0] energy;
  logic [1:0] corr_valid, corr_retard, phase_change;
  int checks = 0, failures = 0;

  rfid_rx_top dut (.*);
  always #5 clk = ~clk;

  bit got [$];
  int n_sop;
  always @(posedge clk) if (rst_n) begin
    if (sop[0]) n_sop++;
    if (bit_valid[0] && n_sop == 1) got.push_back(bit_value[0]);
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hfffffffe, 0)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic int clip(real v);
    if (v > 511.0) return 511;
    if (v < -512.0) return -512;
    return int'(v);
  endfunction

  // returns 1 when the packet was received correctly
  task automatic one_packet(real sigma, output bit ok);
    tag_signal s;
    bit bits [$];
    longint n_total;
    int delay;
    s = new(16);
    for (int c = 0; c < 10; c++) char_bits(8'($urandom), bits);
    begin
      bit frame [$];
      frame = bits;
      for (int k = 0; k < 10; k++) frame.push_back(1'b0);
      s.bpsk(60, 11, 2, frame, 8);
    end
    got.delete();
    n_sop = 0;
    delay = int'($urandom_range(15, 0));
    n_total = longint'(s.periods() + 40) * 16 + delay;
    for (longint n = 0; n < n_total; n++) begin
      @(negedge clk);
      adc_valid = 1'b1;
      adc_i = ADC_W'(clip(real'(s.sample(n, delay, AMP, 0, 0)) + sigma * gauss()));
      adc_q = ADC_W'(clip(sigma * gauss()));
    end
    ok = (n_sop == 1) && (got.size() >= 100);
    for (int k = 0; k < 100 && k < got.size(); k++) if (got[k] != bits[k]) ok = 1'b0;
  endtask

  initial begin
    real ebn0_db [5] = '{99.0, 19.0, 16.0, 13.0, 10.0};
    int  errs [5];
    real a, e;
    bit ok;
    adc_valid = 0; adc_i = '0; adc_q = '0;
    a = real'(AMP) * 2.0 * $sin(2.0 * 3.14159265358979 / 16.0);
    e = (0.6366 * 16.0 * a) ** 2;
    cfg = '0;
    cfg.coding = CODE_BPSK; cfg.sc_period = 7'd16; cfg.ppb = PPB_W'(8); cfg.iir_shift = 3'd1;
    cfg.energy_th = TH_W'(longint'(e / 4.0)); cfg.sof_zeros = 5'd10; cfg.track_en = 1'b1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 5; p++) begin
      real sigma;
      sigma = (ebn0_db[p] > 90.0) ? 0.0 : real'(AMP) * $sqrt(32.0 / (10.0 ** (ebn0_db[p] / 10.0)));
      errs[p] = 0;
      for (int k = 0; k < PACKETS; k++) begin
        one_packet(sigma, ok);
        if (!ok) errs[p]++;
      end
      if (p == 0) $display("Eb/N0 = no noise: PER = %0d/%0d", errs[p], PACKETS);
      else        $display("Eb/N0 = %4.1f dB (sigma %5.1f): PER = %0d/%0d", ebn0_db[p], sigma, errs[p], PACKETS);
    end
    checks++;
    if (errs[0] != 0) begin failures++; $display("FAIL: packets lost without noise"); end
    checks++;
    if (errs[1] > 1) begin failures++; $display("FAIL: more than one packet lost at 19 dB"); end
    checks++;
    if (errs[2] > 4) begin failures++; $display("FAIL: more than four packets lost at 16 dB"); end
    checks++;
    if (errs[1] > errs[3] || errs[2] > errs[4]) begin failures++; $display("FAIL: PER does not fall with Eb/N0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
