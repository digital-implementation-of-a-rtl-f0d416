// Subcarrier mixer with a single-bit local clock.
//
// Multiplying a two's complement sample by a +1/-1 square-wave clock reduces
// to a conditional sign change: the sample passes unchanged while the clock
// is '1' and is negated while it is '0'. The output is one bit wider than the
// input so that negating the most negative input cannot overflow.
// Purely combinational, no latency.
module sc_mixer #(
  parameter int unsigned DW = 11
) (
  input  logic signed [DW-1:0] din,
  input  logic                 lo_clk,   // local subcarrier clock
  output logic signed [DW:0]   dout
);
  always_comb begin
    if (lo_clk) dout = (DW+1)'(din);
    else        dout = -(DW+1)'(din);
  end
endmodule
