// Subcarrier demodulator (digital correlation system, DCS) for one ADC
// channel: a Costas loop built from sign-flip mixers, FIR and IIR low-pass
// filters and a numerically controlled phase, followed by energy detection
// and symbol recognition.
//
// Data path, per sample (one per clock while in_valid):
//   din --+--> sc_mixer (I clock) --> lp_fir --> lp_iir --+--> x^2 --+
//         |                              |                |          +--> sra
//         +--> sc_mixer (Q clock) --> lp_fir --> lp_iir --|--> x^2 --+    ^
//                                        |                +--- I value ---+
//                           signs -----> ncp --> I and Q clocks, dump
// The FIRs integrate over one local subcarrier period and deliver one value
// per period, so the IIRs, the squarers and the SRA run at the subcarrier
// rate. The NCP compares the signs of the two FIR outputs once per period;
// a loop filter of LOOP_VOTES detector votes turns them into one-sample
// moves of both clocks. It holds still while the SRA reports a phase change.
// Once locked, the I branch carries the subcarrier amplitude with the sign
// of its phase, and E = I^2 + Q^2 its energy; the SRA reads both.
//
// Latency from the last sample of a period to the SRA state update: four
// cycles (FIR, IIR, energy, SRA registers). The NCP applies its correction
// at count 3, when the SRA result of the same period is known.
// The structure follows the block diagram of the design; widths, the FIR
// form, the loop filter and the SRA rules are this design's choice.
module subcarrier_demod
  import rfid_demod_pkg::*;
#(
  parameter int unsigned DW        = 11,          // input sample width
  parameter int unsigned AW        = DW + 8,      // FIR / IIR width
  parameter int unsigned FRAC      = 8,           // IIR fractional bits
  parameter int unsigned IIR_ORDER = 2,
  parameter int unsigned PILOT_MIN = 8,
  parameter int unsigned LOOP_VOTES = 4,  // NCP loop filter: votes per correction
  parameter int unsigned EW        = 2*AW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  demod_cfg_t           cfg,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din,
  output logic                 bit_valid,
  output logic                 bit_value,
  output logic                 collision,
  output logic [POS_W-1:0]     pos,
  output logic                 sop,
  output logic                 eop,
  output logic                 busy,
  // observation of the loop
  output logic signed [AW-1:0] i_filt,
  output logic signed [AW-1:0] q_filt,
  output logic [EW-1:0]        energy,
  output logic                 corr_valid,
  output logic                 corr_retard,
  output logic                 phase_change
);
  logic                 lo_i, lo_q, dump;
  logic signed [DW:0]   mix_i, mix_q;
  logic signed [AW-1:0] fir_i, fir_q;
  logic                 fir_i_v, fir_q_v;
  logic                 iir_i_v, iir_q_v;
  logic                 e_valid;
  logic [SC_PERIOD_W-1:0] phase_unused;

  ncp #(.PW(SC_PERIOD_W), .CORR_AT(3), .VOTES(LOOP_VOTES)) u_ncp (
    .clk, .rst_n,
    .en         (in_valid),
    .period     (cfg.sc_period),
    .track_en   (cfg.track_en),
    .freeze     (phase_change),
    .fir_valid  (fir_i_v),
    .fir_i_neg  (fir_i[AW-1]),
    .fir_q_neg  (fir_q[AW-1]),
    .lo_i, .lo_q, .dump,
    .corr_valid, .corr_retard,
    .phase      (phase_unused)
  );

  sc_mixer #(.DW(DW)) u_mix_i (.din, .lo_clk(lo_i), .dout(mix_i));
  sc_mixer #(.DW(DW)) u_mix_q (.din, .lo_clk(lo_q), .dout(mix_q));

  lp_fir #(.DW(DW+1), .AW(AW)) u_fir_i (
    .clk, .rst_n, .in_valid, .din(mix_i), .dump(dump),
    .dout(fir_i), .dout_valid(fir_i_v));
  lp_fir #(.DW(DW+1), .AW(AW)) u_fir_q (
    .clk, .rst_n, .in_valid, .din(mix_q), .dump(dump),
    .dout(fir_q), .dout_valid(fir_q_v));

  lp_iir #(.AW(AW), .FRAC(FRAC), .ORDER(IIR_ORDER), .SHW(SHIFT_W)) u_iir_i (
    .clk, .rst_n, .in_valid(fir_i_v), .din(fir_i), .shift(cfg.iir_shift),
    .dout(i_filt), .dout_valid(iir_i_v));
  lp_iir #(.AW(AW), .FRAC(FRAC), .ORDER(IIR_ORDER), .SHW(SHIFT_W)) u_iir_q (
    .clk, .rst_n, .in_valid(fir_q_v), .din(fir_q), .shift(cfg.iir_shift),
    .dout(q_filt), .dout_valid(iir_q_v));

  energy_sum #(.AW(AW), .EW(EW)) u_energy (
    .clk, .rst_n, .in_valid(iir_i_v && iir_q_v), .i_in(i_filt), .q_in(q_filt),
    .energy, .out_valid(e_valid));

  // the I value is delayed to line up with its energy value
  logic signed [AW-1:0] i_filt_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       i_filt_d <= '0;
    else if (iir_i_v) i_filt_d <= i_filt;
  end

  sra #(.EW(EW), .IW(AW), .PILOT_MIN(PILOT_MIN)) u_sra (
    .clk, .rst_n, .cfg, .e_valid, .energy, .i_value(i_filt_d),
    .bit_valid, .bit_value, .collision, .pos, .sop, .eop, .busy, .phase_change);
endmodule
