// Self-checking test of the subcarrier demodulator (one channel).
//
// Renders tag replies with the tag signal model and checks the decoded bit
// stream against the bits that were sent:
//  - ISO/IEC 14443 type B style BPSK (16 samples per subcarrier period,
//    8 periods per bit, 40-period pilot, 10 SOF zeros, 2 SOF ones, three
//    random characters and 10 EOF zeros) at several tag phase offsets;
//  - ISO/IEC 14443 type A style Manchester (16 samples, 8 periods per bit)
//    with one collision at a known position;
//  - ISO/IEC 15693 style Manchester (32 samples, 16 periods per bit).
// Also checked: one start and one end of packet per reply, that the loop
// reaches phase lock within five one-sample corrections (four to move a
// quarter period plus the first reversal), that phase corrections were
// frozen during phase changes, and the bit rate (spacing of output bits).
module tb_subcarrier_demod;
  import rfid_demod_pkg::*;
  import rfid_tb_pkg::*;

  localparam int DW = 11;
  localparam int AW = DW + 8;
  localparam int EW = 2*AW + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  demod_cfg_t cfg;
  logic in_valid;
  logic signed [DW-1:0] din;
  logic bit_valid, bit_value, collision, sop, eop, busy;
  logic [POS_W-1:0] pos;
  logic signed [AW-1:0] i_filt, q_filt;
  logic [EW-1:0] energy;
  logic corr_valid, corr_retard, phase_change;

  int checks = 0, failures = 0;
  longint cyc = 0;

  subcarrier_demod #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // output monitor
  bit     got [$];
  bit     got_coll [$];
  int     got_pos [$];
  int     n_sop, n_eop, n_corr_before_rev, n_freeze_periods;
  bit     reversed, have_last;
  bit     last_dir;
  longint last_bit_cyc;
  int     max_gap_err;
  int     exp_gap;

  always @(posedge clk) begin
    if (rst_n) begin
      if (bit_valid) begin
        got.push_back(bit_value);
        got_coll.push_back(collision);
        got_pos.push_back(int'(pos));
        if (last_bit_cyc >= 0 && exp_gap > 0) begin
          int e;
          e = int'(cyc - last_bit_cyc) - exp_gap;
          if (e < 0) e = -e;
          if (e > max_gap_err) max_gap_err = e;
        end
        last_bit_cyc = cyc;
      end
      if (sop) n_sop++;
      if (eop) n_eop++;
      if (corr_valid) begin
        if (have_last && corr_retard != last_dir) reversed = 1'b1;
        if (!reversed) n_corr_before_rev++;
        last_dir  = corr_retard;
        have_last = 1'b1;
      end
      if (phase_change && dut.u_sra.e_valid) n_freeze_periods++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_monitor(int gap);
    got.delete(); got_coll.delete(); got_pos.delete();
    n_sop = 0; n_eop = 0; n_corr_before_rev = 0; n_freeze_periods = 0;
    reversed = 1'b0; have_last = 1'b0; last_dir = 1'b0;
    last_bit_cyc = -1; max_gap_err = 0; exp_gap = gap;
  endtask

  task automatic play(tag_signal s, int delay, int amp, int noise, int tail);
    longint n_total;
    n_total = longint'(s.periods() + tail) * s.period + delay;
    for (longint n = 0; n < n_total; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      din = DW'(s.sample(n, delay, amp, 0, noise));
    end
    @(negedge clk);
    din = '0;
  endtask

  function automatic logic [TH_W-1:0] threshold(int p, int amp);
    real e;
    e = (0.6366 * p * amp) ** 2;
    return TH_W'(longint'(e / 4.0));
  endfunction

  task automatic run_bpsk(int delay, int noise);
    tag_signal s;
    bit data [$];
    s = new(16);
    for (int c = 0; c < 3; c++) char_bits(8'($urandom), data);
    for (int k = 0; k < 10; k++) data.push_back(1'b0);
    s.bpsk(40, 10, 2, data, 8);
    cfg.coding = CODE_BPSK; cfg.sc_period = 7'd16; cfg.ppb = PPB_W'(8);
    cfg.iir_shift = 3'd1; cfg.energy_th = threshold(16, 400);
    cfg.sof_zeros = 5'd9; cfg.track_en = 1'b1;
    clear_monitor(8*16);
    play(s, delay, 400, noise, 30);
    check(n_sop == 1, $sformatf("BPSK delay %0d: one start of packet (got %0d)", delay, n_sop));
    check(n_eop == 1, $sformatf("BPSK delay %0d: one end of packet (got %0d)", delay, n_eop));
    check(got.size() == data.size(), $sformatf("BPSK delay %0d: %0d bits (got %0d)", delay, data.size(), got.size()));
    for (int k = 0; k < data.size() && k < got.size(); k++)
      check(got[k] == data[k], $sformatf("BPSK delay %0d: bit %0d", delay, k));
    check(n_corr_before_rev <= 5, $sformatf("BPSK delay %0d: lock in %0d corrections", delay, n_corr_before_rev));
    check(n_freeze_periods > 0, $sformatf("BPSK delay %0d: corrections frozen during phase changes", delay));
    check(max_gap_err <= 24, $sformatf("BPSK delay %0d: bit spacing error %0d samples", delay, max_gap_err));
    $display("BPSK delay %0d: %0d bits, lock after %0d corrections, %0d frozen periods",
             delay, got.size(), n_corr_before_rev, n_freeze_periods);
  endtask

  task automatic run_manchester(int p, int ppb, int nbits, int coll_at, int delay, int noise);
    tag_signal s;
    int syms [$];
    s = new(p);
    for (int k = 0; k < nbits; k++) syms.push_back((k == coll_at) ? 2 : int'($urandom_range(1, 0)));
    s.manchester(syms, ppb);
    cfg.coding = CODE_MANCHESTER; cfg.sc_period = SC_PERIOD_W'(p); cfg.ppb = PPB_W'(ppb);
    cfg.iir_shift = 3'd1; cfg.energy_th = threshold(p, 400);
    cfg.sof_zeros = 5'd0; cfg.track_en = 1'b1;
    clear_monitor(ppb*p);
    play(s, delay, 400, noise, 3*ppb);
    check(n_sop == 1, $sformatf("Manchester P=%0d: one start (got %0d)", p, n_sop));
    check(n_eop == 1, $sformatf("Manchester P=%0d: one end (got %0d)", p, n_eop));
    check(got.size() == nbits, $sformatf("Manchester P=%0d: %0d bits (got %0d)", p, nbits, got.size()));
    for (int k = 0; k < nbits && k < got.size(); k++) begin
      check(got_coll[k] == (k == coll_at), $sformatf("Manchester P=%0d: collision flag of bit %0d", p, k));
      if (syms[k] != 2) check(got[k] == syms[k][0], $sformatf("Manchester P=%0d: bit %0d", p, k));
      else              check(got_pos[k] == coll_at, $sformatf("Manchester P=%0d: collision position", p));
    end
    check(max_gap_err <= ppb, $sformatf("Manchester P=%0d: bit spacing error %0d", p, max_gap_err));
    $display("Manchester P=%0d ppb=%0d delay %0d: %0d bits", p, ppb, delay, got.size());
  endtask

  initial begin
    in_valid = 1'b0;
    din = '0;
    cfg = '0;
    cfg.sc_period = 7'd16;
    cfg.ppb = PPB_W'(8);
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    run_bpsk(0, 0);
    run_bpsk(5, 20);
    run_bpsk(9, 20);
    run_bpsk(13, 40);
    run_bpsk(4, 20);
    run_bpsk(12, 0);
    run_manchester(16, 8, 24, 5, 3, 20);
    run_manchester(16, 8, 16, 11, 11, 40);
    run_manchester(32, 16, 16, 2, 7, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
