// Shared types and constants of the HF RFID subcarrier demodulator.
//
// The demodulator runs from one clock at the carrier frequency fc = 13.56 MHz
// and takes one ADC sample per clock. Everything that changes between
// protocols (bit coding, subcarrier period, bit length, IIR cutoff,
// thresholds) is a run-time setting collected in demod_cfg_t, so the same
// hardware serves ISO/IEC 14443 A/B and ISO/IEC 15693 with different
// settings, as the architecture intends. The field widths are this design's
// own choice.
package rfid_demod_pkg;

  // Bit coding on the subcarrier: phase (BPSK) or presence (Manchester).
  typedef enum logic {
    CODE_BPSK       = 1'b0,
    CODE_MANCHESTER = 1'b1
  } coding_e;

  localparam int unsigned SC_PERIOD_W = 7;   // local subcarrier period in samples, up to 124
  localparam int unsigned PPB_W       = 7;   // subcarrier periods per bit, up to 127
  localparam int unsigned SHIFT_W     = 3;   // IIR coefficient exponent, 0..7
  localparam int unsigned TH_W        = 40;  // energy threshold width
  localparam int unsigned SOFZ_W      = 5;   // minimum SOF zero bits
  localparam int unsigned POS_W       = 10;  // bit index inside a packet

  // Run-time configuration of one demodulator.
  typedef struct packed {
    coding_e                  coding;       // BPSK or Manchester
    logic [SC_PERIOD_W-1:0]   sc_period;    // samples per subcarrier period (16, 32, 64), multiple of 4
    logic [PPB_W-1:0]         ppb;          // subcarrier periods per bit (even for Manchester)
    logic [SHIFT_W-1:0]       iir_shift;    // IIR pole: y += (x - y) / 2**iir_shift
    logic [TH_W-1:0]          energy_th;    // I^2+Q^2 level that means "subcarrier present"
    logic [SOFZ_W-1:0]        sof_zeros;    // BPSK: zero bits that must precede the SOF one bits
    logic                     track_en;     // allow NCP phase corrections
  } demod_cfg_t;

endpackage
