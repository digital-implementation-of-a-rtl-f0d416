// Digital bandpass filter between an ADC and its subcarrier demodulator.
//
// y[n] = x[n] - x[n-2]. The two-tap difference has zeros at DC and at half
// the sample rate: it removes the offset left by the analog chain and the
// image at fs/2, and passes the subcarrier band (fc/64 .. fc/16 at fs = fc)
// with a gain of 2*sin(2*pi*f/fs). The document asks only for a bandpass
// that removes images and sets the bandwidth; the filter itself is this
// design's simplest choice.
//
// Timing: one sample per in_valid, registered output one cycle later.
module digital_bpf #(
  parameter int unsigned IW = 10,     // ADC sample width
  parameter int unsigned OW = IW + 1  // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] din,
  output logic signed [OW-1:0] dout,
  output logic                 dout_valid
);
  logic signed [IW-1:0] d1, d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1         <= '0;
      d2         <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= in_valid;
      if (in_valid) begin
        d1   <= din;
        d2   <= d1;
        dout <= OW'(din) - OW'(d2);
      end
    end
  end
endmodule
