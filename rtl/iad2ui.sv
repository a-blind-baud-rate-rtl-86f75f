// iad2ui: synthesises 2UI integrate-and-dump samples from 1UI ones.
//
// Integrating over two UIs equals the sum of two adjacent one-UI
// integrations, so each lane adds its signed 1UI sample to the one before
// it: y[i] = s[i] + s[i-1]. For lane 0 the previous sample is the last
// lane of the previous word, kept in a register (the z^-1 of the receiver
// diagram). Doing the addition digitally keeps the extra bit of resolution
// that a 5-bit ADC would lose on a 2UI analog integration.
// Timing: y is registered, one cycle after s. Reset clears the history and
// the output.
module iad2ui
  import cdr_pkg::*;
#(
  parameter int unsigned LANES = N_PAR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [S_W-1:0]   s [LANES],
  output logic signed [Y_W-1:0]   y [LANES]
);

  logic signed [S_W-1:0] s_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_last <= '0;
      for (int i = 0; i < LANES; i++) y[i] <= '0;
    end else begin
      s_last <= s[LANES-1];
      y[0]   <= Y_W'(s[0]) + Y_W'(s_last);
      for (int i = 1; i < LANES; i++) begin
        y[i] <= Y_W'(s[i]) + Y_W'(s[i-1]);
      end
    end
  end

endmodule
