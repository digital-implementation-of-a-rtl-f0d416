// Squarers and adder at the end of the two sub-channels.
//
// Each filtered sub-channel value is multiplied by itself and the two squares
// are added, giving I^2 + Q^2: a measure of subcarrier energy that no longer
// depends on the residual phase between subcarrier and local clock. The
// symbol recognition block reads subcarrier presence (Manchester) and phase
// changes (the dip that a 180 degree phase step causes, BPSK) from it.
//
// Timing: registered, out_valid the cycle after in_valid.
module energy_sum #(
  parameter int unsigned AW = 19,
  parameter int unsigned EW = 2*AW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] i_in,
  input  logic signed [AW-1:0] q_in,
  output logic [EW-1:0]        energy,
  output logic                 out_valid
);
  logic signed [2*AW-1:0] i_sq, q_sq;

  always_comb begin
    i_sq = (2*AW)'(i_in) * (2*AW)'(i_in);
    q_sq = (2*AW)'(q_in) * (2*AW)'(q_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      energy    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) energy <= EW'(unsigned'(i_sq)) + EW'(unsigned'(q_sq));
    end
  end
endmodule
