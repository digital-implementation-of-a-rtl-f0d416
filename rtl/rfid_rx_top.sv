// Digital half of an HF RFID reader receiver.
//
// The analog front end mixes the antenna signal down with the 13.56 MHz
// carrier in quadrature, amplifies and bandpass filters it, and two ADCs
// deliver the I and Q channels, each carrying the tag's subcarrier. This
// module takes those two sample streams, one sample per clock at fc, and
// processes each channel independently: a digital bandpass filter, then a
// subcarrier demodulator (Costas loop and symbol recognition) that outputs
// the bit stream, the start of a packet and Manchester collisions. Both
// channels share one run-time configuration that selects the protocol. Which
// channel, or which combination, the frame decoder uses is left to it: the
// amplitude/phase split between I and Q depends on the tag's position.
//
// Ports: the ADC samples come in as plain signed words; each channel's
// results leave as packed arrays indexed 0 for the I channel and 1 for the Q
// channel.
module rfid_rx_top
  import rfid_demod_pkg::*;
#(
  parameter int unsigned ADC_W     = 10,
  parameter int unsigned DW        = ADC_W + 1,
  parameter int unsigned AW        = DW + 8,
  parameter int unsigned EW        = 2*AW + 1,
  parameter int unsigned IIR_ORDER = 2,
  parameter int unsigned PILOT_MIN = 8,
  parameter int unsigned LOOP_VOTES = 4
) (
  input  logic                    clk,        // fc = 13.56 MHz
  input  logic                    rst_n,
  input  demod_cfg_t              cfg,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_i,
  input  logic signed [ADC_W-1:0] adc_q,
  output logic [1:0]              bit_valid,
  output logic [1:0]              bit_value,
  output logic [1:0]              collision,
  output logic [1:0][POS_W-1:0]   pos,
  output logic [1:0]              sop,
  output logic [1:0]              eop,
  output logic [1:0]              busy,
  output logic [1:0][AW-1:0]      i_filt,     // I sub-channel after the LP IIR
  output logic [1:0][AW-1:0]      q_filt,     // Q sub-channel after the LP IIR
  output logic [1:0][EW-1:0]      energy,
  output logic [1:0]              corr_valid,
  output logic [1:0]              corr_retard,
  output logic [1:0]              phase_change
);
  logic signed [ADC_W-1:0] adc [2];
  logic signed [DW-1:0]    bpf [2];
  logic                    bpf_v [2];

  assign adc[0] = adc_i;
  assign adc[1] = adc_q;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    digital_bpf #(.IW(ADC_W), .OW(DW)) u_bpf (
      .clk, .rst_n, .in_valid(adc_valid), .din(adc[c]),
      .dout(bpf[c]), .dout_valid(bpf_v[c]));

    subcarrier_demod #(
      .DW(DW), .AW(AW), .IIR_ORDER(IIR_ORDER), .PILOT_MIN(PILOT_MIN), .LOOP_VOTES(LOOP_VOTES), .EW(EW)
    ) u_dcs (
      .clk, .rst_n, .cfg,
      .in_valid     (bpf_v[c]),
      .din          (bpf[c]),
      .bit_valid    (bit_valid[c]),
      .bit_value    (bit_value[c]),
      .collision    (collision[c]),
      .pos          (pos[c]),
      .sop          (sop[c]),
      .eop          (eop[c]),
      .busy         (busy[c]),
      .i_filt       (i_filt[c]),
      .q_filt       (q_filt[c]),
      .energy       (energy[c]),
      .corr_valid   (corr_valid[c]),
      .corr_retard  (corr_retard[c]),
      .phase_change (phase_change[c]));
  end
endmodule
