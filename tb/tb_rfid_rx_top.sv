// End-to-end test of the digital receiver at its default parameters.
//
// The tag signal model feeds both ADC inputs: the I and Q channels carry
// the same tag reply with different amplitudes (the tag's position sets how
// the response splits between them) and different DC offsets, which the
// digital bandpass must remove. Five replies are received back to back,
// the run-time configuration being switched between them:
//  1. ISO/IEC 14443 type B, BPSK, fc/16 subcarrier, 8 periods per bit,
//     IIR shift 1: pilot, SOF, 10 characters (8 data + 2 CRC bytes as in
//     the packet error rate measurements) and EOF;
//  2. ISO/IEC 14443 type A, Manchester, fc/16, 8 periods per bit, with two
//     collisions, IIR shift 0 (filter bypassed);
//  3. ISO/IEC 15693, Manchester, fc/32, 16 periods per bit, IIR shift 1;
//  4. ISO/IEC 14443 type B at fc/64, 4 periods per bit, 6 characters;
//  5. ISO/IEC 15693 at fc/2048, 64 periods per bit, IIR shift 2.
// Each channel's bit stream is compared with what was sent. Each mechanism
// of the design is counted and must occur at least once: start of packet,
// end of packet, collision, clock retard, clock advance, correction
// freezing during phase changes, coding switch, subcarrier period switch
// and IIR cutoff switch.
module tb_rfid_rx_top;
  import rfid_demod_pkg::*;
  import rfid_tb_pkg::*;

  localparam int ADC_W = 10;
  localparam int EW = 2*(ADC_W + 1 + 8) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  demod_cfg_t cfg;
  logic adc_valid;
  logic signed [ADC_W-1:0] adc_i, adc_q;
  logic [1:0] bit_valid, bit_value, collision, sop, eop, busy;
  logic [1:0][POS_W-1:0] pos;
  logic [1:0][EW-1:0] energy;
  logic [1:0][ADC_W+8:0] i_filt, q_filt;
  logic [1:0] corr_valid, corr_retard, phase_change;
  int checks = 0, failures = 0;

  rfid_rx_top dut (.*);
  always #5 clk = ~clk;

  bit got [2][$];
  bit got_c [2][$];
  int n_sop [2], n_eop [2];
  int m_sop, m_eop, m_coll, m_retard, m_advance, m_freeze, m_coding_switch, m_period_switch, m_cutoff_switch;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (bit_valid[c]) begin got[c].push_back(bit_value[c]); got_c[c].push_back(collision[c]); end
      if (sop[c]) begin n_sop[c]++; m_sop++; end
      if (eop[c]) begin n_eop[c]++; m_eop++; end
      if (bit_valid[c] && collision[c]) m_coll++;
      if (corr_valid[c] && corr_retard[c]) m_retard++;
      if (corr_valid[c] && !corr_retard[c]) m_advance++;
      if (phase_change[c] && corr_valid[c]) begin failures++; $display("FAIL: correction while frozen"); end
      if (phase_change[c]) m_freeze++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear();
    for (int c = 0; c < 2; c++) begin got[c].delete(); got_c[c].delete(); n_sop[c] = 0; n_eop[c] = 0; end
  endtask

  task automatic set_cfg(coding_e cod, int p, int ppb, int sh, longint th, int sofz);
    if (cod != cfg.coding) m_coding_switch++;
    if (SC_PERIOD_W'(p) != cfg.sc_period) m_period_switch++;
    if (SHIFT_W'(sh) != cfg.iir_shift) m_cutoff_switch++;
    cfg.coding = cod; cfg.sc_period = SC_PERIOD_W'(p); cfg.ppb = PPB_W'(ppb);
    cfg.iir_shift = SHIFT_W'(sh); cfg.energy_th = TH_W'(th); cfg.sof_zeros = SOFZ_W'(sofz);
    cfg.track_en = 1'b1;
  endtask

  localparam int AMP_I = 400, AMP_Q = 340;

  task automatic play(tag_signal s, int delay, int noise, int tail);
    longint n_total;
    n_total = longint'(s.periods() + tail) * s.period + delay;
    for (longint n = 0; n < n_total; n++) begin
      @(negedge clk);
      adc_valid = 1'b1;
      adc_i = ADC_W'(s.sample(n, delay, AMP_I, 37, noise));
      adc_q = ADC_W'(-s.sample(n, delay, AMP_Q, -21, noise));
    end
  endtask

  // Energy threshold: a quarter of the locked energy of the weaker channel,
  // after the bandpass gain 2*sin(2*pi/p).
  function automatic longint threshold(int p);
    real a, e;
    a = real'(AMP_Q) * 2.0 * $sin(2.0 * 3.14159265358979 / real'(p));
    e = (0.6366 * real'(p) * a) ** 2;
    return longint'(e / 4.0);
  endfunction

  task automatic compare(bit exp_b [$], bit exp_c [$], string name);
    for (int c = 0; c < 2; c++) begin
      check(n_sop[c] == 1, $sformatf("%s ch%0d: one start of packet (got %0d)", name, c, n_sop[c]));
      check(n_eop[c] == 1, $sformatf("%s ch%0d: one end of packet (got %0d)", name, c, n_eop[c]));
      check(got[c].size() == exp_b.size(), $sformatf("%s ch%0d: %0d bits (got %0d)", name, c, exp_b.size(), got[c].size()));
      for (int k = 0; k < exp_b.size() && k < got[c].size(); k++) begin
        check(got_c[c][k] == exp_c[k], $sformatf("%s ch%0d: collision flag of bit %0d", name, c, k));
        if (!exp_c[k]) check(got[c][k] == exp_b[k], $sformatf("%s ch%0d: bit %0d", name, c, k));
      end
    end
    $display("%s: %0d bits per channel", name, exp_b.size());
  endtask

  initial begin
    tag_signal s;
    bit bits [$], colls [$];
    int syms [$];
    adc_valid = 0; adc_i = '0; adc_q = '0;
    cfg = '0;
    cfg.coding = CODE_BPSK; cfg.sc_period = 7'd16;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // 1. ISO/IEC 14443 type B, fc/128
    clear();
    set_cfg(CODE_BPSK, 16, 8, 1, threshold(16), 10);
    s = new(16);
    bits.delete(); colls.delete();
    for (int c = 0; c < 10; c++) char_bits(8'($urandom), bits);
    for (int k = 0; k < 10; k++) bits.push_back(1'b0);
    foreach (bits[k]) colls.push_back(1'b0);
    s.bpsk(60, 11, 2, bits, 8);
    play(s, 6, 10, 40);
    compare(bits, colls, "ISO14443B");

    // 2. ISO/IEC 14443 type A, fc/128, two collisions
    clear();
    set_cfg(CODE_MANCHESTER, 16, 8, 0, threshold(16), 0);
    s = new(16);
    syms.delete(); bits.delete(); colls.delete();
    for (int k = 0; k < 36; k++) syms.push_back((k == 7 || k == 20) ? 2 : int'($urandom_range(1, 0)));
    foreach (syms[k]) begin bits.push_back(syms[k] != 0); colls.push_back(syms[k] == 2); end
    s.manchester(syms, 8);
    play(s, 11, 10, 30);
    compare(bits, colls, "ISO14443A");

    // 3. ISO/IEC 15693, fc/512, one subcarrier at fc/32
    clear();
    set_cfg(CODE_MANCHESTER, 32, 16, 1, threshold(32), 0);
    s = new(32);
    syms.delete(); bits.delete(); colls.delete();
    for (int k = 0; k < 24; k++) syms.push_back(int'($urandom_range(1, 0)));
    foreach (syms[k]) begin bits.push_back(syms[k] != 0); colls.push_back(1'b0); end
    s.manchester(syms, 16);
    play(s, 19, 10, 50);
    compare(bits, colls, "ISO15693");

    // 4. ISO/IEC 14443 type B, fc/64 (4 subcarrier periods per bit)
    clear();
    set_cfg(CODE_BPSK, 16, 4, 1, threshold(16), 10);
    s = new(16);
    bits.delete(); colls.delete();
    for (int c = 0; c < 6; c++) char_bits(8'($urandom), bits);
    for (int k = 0; k < 10; k++) bits.push_back(1'b0);
    foreach (bits[k]) colls.push_back(1'b0);
    s.bpsk(60, 11, 2, bits, 4);
    play(s, 3, 10, 40);
    compare(bits, colls, "ISO14443B fc/64");

    // 5. ISO/IEC 15693 at fc/2048, 64 subcarrier periods per bit
    clear();
    set_cfg(CODE_MANCHESTER, 32, 64, 2, threshold(32), 0);
    s = new(32);
    syms.delete(); bits.delete(); colls.delete();
    for (int k = 0; k < 10; k++) syms.push_back(int'($urandom_range(1, 0)));
    foreach (syms[k]) begin bits.push_back(syms[k] != 0); colls.push_back(1'b0); end
    s.manchester(syms, 64);
    play(s, 9, 10, 150);
    compare(bits, colls, "ISO15693 fc/2048");

    $display("mechanisms: sop=%0d eop=%0d collision=%0d retard=%0d advance=%0d frozen=%0d coding_switch=%0d period_switch=%0d",
             m_sop, m_eop, m_coll, m_retard, m_advance, m_freeze, m_coding_switch, m_period_switch);
    check(m_sop > 0, "start of packet seen");
    check(m_eop > 0, "end of packet seen");
    check(m_coll > 0, "collision seen");
    check(m_retard > 0, "clock retard seen");
    check(m_advance > 0, "clock advance seen");
    check(m_freeze > 0, "correction freeze seen");
    check(m_coding_switch > 0, "coding switch made");
    check(m_period_switch > 0, "subcarrier period switch made");
    check(m_cutoff_switch > 1, "IIR cutoff switch made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
