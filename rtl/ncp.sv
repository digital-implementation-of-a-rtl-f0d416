// Numerically controlled phase (NCP): generator of the I and Q local
// subcarrier clocks and the phase detector of the Costas loop.
//
// A sample counter runs from 0 to period-1, one step per sample (en). The I clock is
// '1' for the first half of the count and the Q clock is the same square
// wave delayed by a quarter period, so the two stay 90 degrees apart. The
// last count raises 'dump', which closes the integration window of both LP
// FIRs.
//
// Phase detector: once per local period, CORR_AT samples after the dump (the
// time the filter and energy pipeline needs to report a phase change of the
// same period), the signs of the I and Q FIR outputs of that period are
// compared. Equal signs mean the subcarrier is later than the I clock, so the
// clock is retarded by one sample (the counter holds for one extra cycle);
// different signs mean it is earlier, so the clock is advanced by one sample
// (the counter skips one value). The product of the two signs is the same
// for both subcarrier phases, which is what makes the loop insensitive to
// the BPSK data. Corrections are suppressed while 'freeze' is high (a phase
// change on the subcarrier is under way) or 'track_en' is low.
//
// Loop filter: each comparison is a vote (+1 retard, -1 advance) into a
// signed up/down counter; the clock is moved only when the count reaches
// +VOTES or -VOTES, and the count then restarts from zero. With VOTES = 1
// every comparison moves the clock. Near lock the Q sign is mostly noise, and
// without the filter the clock random-walks far enough in noise to slip by
// half a period, which inverts the data; a few votes average this out at the
// cost of a proportionally slower pull-in.
//
// Interface and timing: fir_valid may come at any time in the period; the
// comparison is used at the next count CORR_AT, and corr_valid/corr_retard
// report the move one cycle later. lo_i, lo_q and dump are combinational
// from the counter.
//
// From the document: the two clocks in quadrature, the use of only the signs
// of the filter outputs, one correction of one sample per subcarrier period
// at most, and the freezing during phase changes. The counter form, the
// moment of the correction and the vote filter are this design's choice.
module ncp #(
  parameter int unsigned PW      = 7,  // width of the period setting
  parameter int unsigned CORR_AT = 3,  // count at which a correction is applied
  parameter int unsigned VOTES   = 1   // net detector votes needed for one correction
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,            // one sample this cycle
  input  logic [PW-1:0] period,        // samples per subcarrier period, multiple of 4, >= 8
  input  logic          track_en,
  input  logic          freeze,
  input  logic          fir_valid,     // FIR outputs of the closed period are valid
  input  logic          fir_i_neg,     // sign bit of the I FIR output
  input  logic          fir_q_neg,     // sign bit of the Q FIR output
  output logic          lo_i,          // I local subcarrier clock
  output logic          lo_q,          // Q local subcarrier clock
  output logic          dump,          // last sample of the local period
  output logic          corr_valid,    // a correction was applied this cycle
  output logic          corr_retard,   // 1: clock delayed, 0: clock advanced
  output logic [PW-1:0] phase          // current counter value
);
  logic [PW-1:0] cnt;
  logic          sgn_diff;   // latched sign comparison of the last FIR outputs
  logic          pend;       // a comparison waits to be applied
  logic          apply;
  logic [PW-1:0] half, quarter;

  // Sequential loop filter: signed up/down count of detector votes
  // (+1 = retard, -1 = advance); a correction is made when it reaches +-VOTES.
  localparam int unsigned VW = $clog2(VOTES + 1) + 1;
  logic signed [VW-1:0] votes, votes_next;
  logic                 do_retard, do_advance;

  always_comb begin
    votes_next = votes + (sgn_diff ? -VW'(1) : VW'(1));
    do_retard  = apply && (votes_next >=  $signed(VW'(VOTES)));
    do_advance = apply && (votes_next <= -$signed(VW'(VOTES)));
  end

  assign half    = period >> 1;
  assign quarter = period >> 2;
  assign dump    = en && (cnt >= period - PW'(1));
  assign lo_i    = (cnt < half);
  assign lo_q    = (cnt >= quarter) && (cnt < half + quarter);
  assign phase   = cnt;
  assign apply   = en && pend && (cnt == PW'(CORR_AT)) && track_en && !freeze;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      sgn_diff    <= 1'b0;
      pend        <= 1'b0;
      corr_valid  <= 1'b0;
      corr_retard <= 1'b0;
      votes       <= '0;
    end else begin
      corr_valid <= 1'b0;
      if (apply) votes <= (do_retard || do_advance) ? '0 : votes_next;
      if (fir_valid) begin
        sgn_diff <= fir_i_neg ^ fir_q_neg;
        pend     <= 1'b1;
      end else if (en && cnt == PW'(CORR_AT)) begin
        pend <= 1'b0;
      end

      if (!en) begin
        cnt <= cnt;
      end else if (dump) begin
        cnt <= '0;
      end else if (do_retard) begin
        cnt         <= cnt;          // retard: this count lasts two samples
        corr_valid  <= 1'b1;
        corr_retard <= 1'b1;
      end else if (do_advance) begin
        cnt         <= cnt + PW'(2); // advance: one count is skipped
        corr_valid  <= 1'b1;
        corr_retard <= 1'b0;
      end else begin
        cnt <= cnt + PW'(1);
      end
    end
  end
endmodule
