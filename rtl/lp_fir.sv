// Low-pass FIR of one sub-channel, with decimation to one output per local
// subcarrier period.
//
// The filter is a boxcar (all taps one) as long as one local subcarrier
// period, which places its zeros exactly on the subcarrier frequency and its
// harmonics, i.e. on the higher-order products of mixing. Because only one
// output per period is needed by the rest of the loop, the boxcar is built as
// an integrate-and-dump accumulator: it adds every mixed sample and, on the
// 'dump' strobe that marks the last sample of a local period, outputs the
// sum and restarts. A period that the phase controller lengthens or shortens
// by one sample is summed over that many samples.
//
// Timing: dout is registered and valid (dout_valid high) for one cycle, the
// cycle after 'dump'. The boxcar form and the decimation point are this
// design's choice; the document gives only the filter's purpose.
module lp_fir #(
  parameter int unsigned DW = 12,   // input width (mixer output)
  parameter int unsigned AW = 19    // accumulator / output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] din,
  input  logic                 dump,       // last sample of the local period
  output logic signed [AW-1:0] dout,
  output logic                 dout_valid
);
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] acc_next;

  always_comb begin
    acc_next = acc;
    if (in_valid) acc_next = acc + AW'(din);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (dump) begin
        dout       <= acc_next;
        dout_valid <= 1'b1;
        acc        <= '0;
      end else begin
        acc <= acc_next;
      end
    end
  end
endmodule
