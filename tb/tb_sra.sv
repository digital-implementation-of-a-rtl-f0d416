// Self-checking test of the symbol recognition block, driven directly with
// energy values (one per subcarrier period).
// BPSK: pilot, 10 SOF zeros, 2 SOF ones and random data, given as I values
// whose sign is the subcarrier phase (either polarity for the pilot) plus
// noise, and whose first period after a phase change is near zero. The
// output bits must equal the data (start bit first), with one start and one
// end of packet, and 'phase_change' must be high in the two periods after
// each sign change of I. A reply with too short a SOF must give no start.
// Manchester: a start symbol, random bits and collisions; bits, collision
// flags and positions must match, ending with one end of packet.
module tb_sra;
  import rfid_demod_pkg::*;
  localparam int EW = 39;
  logic clk = 1'b0, rst_n = 1'b0;
  demod_cfg_t cfg;
  logic e_valid;
  logic [EW-1:0] energy;
  logic signed [18:0] i_value;
  logic bit_valid, bit_value, collision, sop, eop, busy, phase_change;
  logic [POS_W-1:0] pos;
  int checks = 0, failures = 0;

  sra #(.EW(EW), .IW(19), .PILOT_MIN(8)) dut (.*);
  always #5 clk = ~clk;

  bit got [$]; bit got_c [$]; int got_p [$];
  int n_sop, n_eop, n_pc;

  always @(posedge clk) if (rst_n) begin
    if (bit_valid) begin got.push_back(bit_value); got_c.push_back(collision); got_p.push_back(int'(pos)); end
    if (sop) n_sop++;
    if (eop) n_eop++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic period_e(longint e, output bit pc, input int iv = 0);
    energy = EW'(e); e_valid = 1; i_value = 19'(iv);
    @(negedge clk);
    e_valid = 0;
    pc = phase_change;
    repeat (3) @(negedge clk);
  endtask

  task automatic clear();
    got.delete(); got_c.delete(); got_p.delete(); n_sop = 0; n_eop = 0; n_pc = 0;
  endtask

  task automatic bpsk(int sof0, bit data [$], bit polarity, output int dips);
    bit stream [$];
    bit prev, pc, ineg_prev;
    int errs, since_edge;
    errs = 0;
    dips = 0;
    for (int k = 0; k < sof0; k++) stream.push_back(0);
    stream.push_back(1); stream.push_back(1);
    foreach (data[k]) stream.push_back(data[k]);
    prev = 1;
    ineg_prev = !polarity;
    since_edge = 99;
    for (int k = 0; k < 20; k++) begin
      period_e(1000000, pc, (polarity ? 1000 : -1000) + int'($urandom_range(400, 0)) - 200);
      ineg_prev = !polarity;
    end
    foreach (stream[k]) begin
      for (int j = 0; j < 8; j++) begin
        int iv;
        bit d;
        d = (j == 0) && (stream[k] != prev);
        iv = ((stream[k] == polarity) ? 1000 : -1000) + int'($urandom_range(400, 0)) - 200;
        if (d) iv = iv / 4;
        period_e(1000000, pc, iv);
        if ((iv < 0) != ineg_prev) since_edge = 0; else since_edge++;
        ineg_prev = (iv < 0);
        if (pc != (since_edge < 2)) errs++;
        if (d) dips++;
      end
      prev = stream[k];
    end
    for (int k = 0; k < 20; k++) period_e(0, pc, 0);
    check(errs == 0, $sformatf("phase_change follows the sign changes of I (%0d wrong)", errs));
  endtask

  initial begin
    bit data [$];
    int dips;
    int syms [$];
    bit pc;
    e_valid = 0; energy = '0; i_value = '0;
    cfg = '0;
    cfg.coding = CODE_BPSK; cfg.sc_period = 7'd16; cfg.ppb = PPB_W'(8); cfg.iir_shift = 3'd1;
    cfg.energy_th = 40'd100000; cfg.sof_zeros = 5'd10; cfg.track_en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // BPSK, valid SOF
    for (int k = 0; k < 30; k++) data.push_back(1'($urandom));
    data.push_front(1'b0);   // start bit after the SOF
    for (int pol = 0; pol < 2; pol++) begin
      clear();
      bpsk(10, data, 1'(pol), dips);
      check(n_sop == 1 && n_eop == 1, $sformatf("BPSK one sop/eop (got %0d/%0d)", n_sop, n_eop));
      check(got.size() == data.size(), $sformatf("BPSK %0d bits (got %0d)", data.size(), got.size()));
      for (int k = 0; k < data.size() && k < got.size(); k++) begin
        check(got[k] == data[k], $sformatf("BPSK bit %0d", k));
        check(got_p[k] == k, "BPSK bit position");
      end
    end
    // BPSK, SOF too short: no packet
    clear();
    bpsk(6, data, 1'b1, dips);
    check(n_sop == 0 && got.size() == 0, "short SOF is rejected");
    // Manchester
    cfg.coding = CODE_MANCHESTER; cfg.sof_zeros = 5'd0;
    clear();
    syms.delete();
    for (int k = 0; k < 32; k++) syms.push_back((k % 9 == 4) ? 2 : int'($urandom_range(1, 0)));
    for (int k = 0; k < 6; k++) period_e(0, pc);
    // start symbol (on, off), then the symbols, then silence
    repeat (4) period_e(1000000, pc);
    repeat (4) period_e(0, pc);
    foreach (syms[k]) begin
      repeat (4) period_e(syms[k] != 0 ? 1000000 : 0, pc);
      repeat (4) period_e(syms[k] != 1 ? 1000000 : 0, pc);
    end
    repeat (12) period_e(0, pc);
    check(n_sop == 1 && n_eop == 1, $sformatf("Manchester one sop/eop (got %0d/%0d)", n_sop, n_eop));
    check(got.size() == syms.size(), $sformatf("Manchester %0d bits (got %0d)", syms.size(), got.size()));
    for (int k = 0; k < syms.size() && k < got.size(); k++) begin
      check(got_c[k] == (syms[k] == 2), $sformatf("Manchester collision flag %0d", k));
      check(got_p[k] == k, "Manchester position");
      if (syms[k] != 2) check(got[k] == syms[k][0], $sformatf("Manchester bit %0d", k));
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
