// clk_div4: divides the 2.5GHz interleaved-ADC clock by four to make the
// 625MHz clock of the digital CDR.
//
// A two-bit counter runs on the fast clock; its MSB is the divided clock,
// so clk_out rises on the fast edge where the count goes from 1 to 2.
// load is high during count 3 and tells the 4:16 demux to transfer its
// collected samples on the next fast edge, two fast cycles before clk_out
// rises, so the word is stable around the divided clock's edges.
// Reset (asynchronous, active low) clears the count.
// The published design only shows a divide-by-4 to 625MHz; the counter and
// the load strobe are this implementation's.
module clk_div4 (
  input  logic clk_fast,
  input  logic rst_n,
  output logic clk_out,
  output logic load
);

  logic [1:0] cnt;

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 2'd1;
  end

  assign clk_out = cnt[1];
  assign load    = (cnt == 2'd3);

endmodule
