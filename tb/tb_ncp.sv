// Self-checking test of the numerically controlled phase.
// Checks, for periods of 16 and 32 samples: the I clock is high for the
// first half of each local period, the Q clock is the I clock delayed by a
// quarter period, 'dump' marks every period; and the phase detector: equal
// FIR signs lengthen the next period by one sample (retard), different
// signs shorten it by one (advance), while 'freeze' or a cleared 'track_en'
// leave it unchanged. A second instance with a loop filter of 3 votes gets
// random detector votes and must correct exactly when a model up/down count
// of the votes reaches +-3, in the direction of the count.
module tb_ncp;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, track_en, freeze, fir_valid, fir_i_neg, fir_q_neg;
  logic [6:0] period;
  logic lo_i, lo_q, dump, corr_valid, corr_retard;
  logic [6:0] phase;
  int checks = 0, failures = 0;
  longint cyc = 0;
  bit lo_i_hist [$];

  ncp #(.PW(7), .CORR_AT(3)) dut (.*);

  logic fv3 = 1'b0, in3 = 1'b0, qn3 = 1'b0;
  logic lo_i3, lo_q3, dump3, cv3, cr3;
  logic [6:0] ph3;
  ncp #(.PW(7), .CORR_AT(3), .VOTES(3)) dut3 (
    .clk, .rst_n, .en, .period, .track_en(1'b1), .freeze(1'b0),
    .fir_valid(fv3), .fir_i_neg(in3), .fir_q_neg(qn3),
    .lo_i(lo_i3), .lo_q(lo_q3), .dump(dump3), .corr_valid(cv3),
    .corr_retard(cr3), .phase(ph3));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run one local period from the cycle after a dump; returns its length
  task automatic one_period(int scenario, int p, output int len);
    // scenario: 0 none, 1 equal signs, 2 different signs, 3 frozen, 4 tracking off
    int n;
    int ones;
    ones = 0;
    n = 0;
    fir_valid = (scenario != 0);
    fir_i_neg = 1'($urandom);
    fir_q_neg = (scenario == 2) ? !fir_i_neg : fir_i_neg;
    freeze    = (scenario == 3);
    track_en  = (scenario != 4);
    do begin
      #1;
      if (n < p/2 && !lo_i && scenario == 0) check(0, "I clock low in first half");
      if (n >= p/2 + 1 && lo_i && scenario == 0) check(0, "I clock high in second half");
      if (lo_i) ones++;
      // quarter-period delay of Q with respect to I
      lo_i_hist.push_back(lo_i);
      if (scenario == 0 && lo_i_hist.size() > p/4)
        check(lo_q == lo_i_hist[lo_i_hist.size() - 1 - p/4], "Q clock is I delayed by a quarter period");
      n++;
      @(negedge clk);
      fir_valid = 1'b0;
    end while (!(dump === 1'b1) || n < 2);
    // count the dump cycle itself
    #1;
    lo_i_hist.push_back(lo_i);
    len = n + 1;
    @(negedge clk);
  endtask

  // one detector vote to the 3-vote instance after its next dump
  task automatic vote3(bit diff, output bit corr, output bit retard);
    while (!dump3) @(negedge clk);
    @(negedge clk);
    fv3 = 1'b1;
    in3 = 1'($urandom);
    qn3 = diff ? !in3 : in3;
    @(negedge clk);
    fv3 = 1'b0;
    corr = 1'b0;
    retard = 1'b0;
    repeat (6) begin
      #1;
      if (cv3) begin corr = 1'b1; retard = cr3; end
      @(negedge clk);
    end
  endtask

  initial begin
    int len;
    en = 1; track_en = 1; freeze = 0; fir_valid = 0; fir_i_neg = 0; fir_q_neg = 0;
    period = 7'd16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pi = 0; pi < 2; pi++) begin
      int p;
      p = pi ? 32 : 16;
      period = 7'(p);
      // align to a dump
      while (!dump) @(negedge clk);
      @(negedge clk);
      lo_i_hist.delete();
      for (int k = 0; k < 5; k++) begin
        one_period(0, p, len);
        check(len == p, $sformatf("free-running period %0d (got %0d)", p, len));
      end
      for (int k = 0; k < 40; k++) begin
        int sc;
        sc = int'($urandom_range(4, 1));
        one_period(sc, p, len);
        case (sc)
          1: check(len == p + 1, $sformatf("retard gives %0d (got %0d)", p + 1, len));
          2: check(len == p - 1, $sformatf("advance gives %0d (got %0d)", p - 1, len));
          default: check(len == p, $sformatf("no correction when frozen/off (got %0d)", len));
        endcase
        lo_i_hist.delete();
      end
    end
    begin
      int votes, n_corr;
      bit diff, corr, retard, exp_corr;
      votes = 0;
      n_corr = 0;
      for (int k = 0; k < 80; k++) begin
        diff = (k < 3) ? 1'b0 : 1'($urandom);
        votes += diff ? -1 : 1;
        exp_corr = (votes == 3 || votes == -3);
        vote3(diff, corr, retard);
        check(corr == exp_corr, $sformatf("3-vote filter: correction %0d, expected %0d (count %0d)", corr, exp_corr, votes));
        if (exp_corr && corr) begin
          check(retard == (votes > 0), "3-vote filter: correction direction");
          n_corr++;
        end
        if (exp_corr) votes = 0;
      end
      check(n_corr > 0, "3-vote filter made corrections");
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
