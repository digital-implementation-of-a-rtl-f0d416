// Low-pass IIR of one sub-channel, running at the decimated rate.
//
// ORDER identical first-order sections in cascade. Each section computes
// y <= y + (x - y) / 2**shift, with FRAC fractional bits kept inside, so the
// pole, and with it the cutoff frequency, is set at run time by 'shift'
// without changing the structure (shift = 0 passes the input through). This
// matches the requirement that the cutoff be adjustable to the data rate with
// the same hardware; the section type, the order and the word lengths are
// this design's choice.
//
// Timing: one result per in_valid; dout is registered and valid
// (dout_valid high) the cycle after in_valid. All sections update in that
// same cycle.
module lp_iir #(
  parameter int unsigned AW    = 19,  // input and output width
  parameter int unsigned FRAC  = 8,   // fractional bits inside the sections
  parameter int unsigned ORDER = 2,   // number of first-order sections
  parameter int unsigned SHW   = 3    // width of the shift control
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] din,
  input  logic [SHW-1:0]       shift,
  output logic signed [AW-1:0] dout,
  output logic                 dout_valid
);
  localparam int unsigned IW = AW + FRAC + 1;

  logic signed [IW-1:0] y [ORDER];
  logic signed [IW-1:0] y_next [ORDER];

  always_comb begin
    logic signed [IW-1:0] x;
    x = IW'(din) <<< FRAC;
    for (int k = 0; k < ORDER; k++) begin
      y_next[k] = y[k] + ((x - y[k]) >>> shift);
      x = y_next[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) y[k] <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < ORDER; k++) y[k] <= y_next[k];
      end
    end
  end

  assign dout = AW'(y[ORDER-1] >>> FRAC);
endmodule
