// mmpd: speculative Mueller-Muller phase detector.
//
// The detector drives F = h0 - h1 to zero, which puts the main cursor at
// the flat top of the 2UI I&D pulse response where the first post-cursor
// equals it and the pre-cursor is zero. With h0 estimated by
// E[x(k-1)A(k-1)] and h1 by E[x(k)A(k-1)], each sample gives
//     pd(k) = (x(k-1) - x(k)) * A(k-1).
// The difference does not need the decision, so it is formed and
// registered in the same cycle in which the DFE resolves the bits; one
// cycle later the decision only selects +diff or -diff. The output is
// positive when the sampling phase is late.
// Interface: xp[]/xp_cnt are the interpolated samples scaled by 1/8, in the
// same cycle as the DFE's input. a[]/a_cnt are the DFE decisions for that
// word, one cycle later (1 = +1). Slot 0 pairs with the last valid sample
// and decision of the previous word. pd[] gives one result for each of the
// first 16 slots, pd_valid marks slots below the count; the 17th sample a
// backward phase wrap produces feeds the next word's slot 0 only.
// Timing: the difference is registered one cycle after xp; pd and pd_valid
// are combinational from that register and from a, so they are ready in the
// cycle the decisions arrive.
// The subtract-register-select structure and the widths (10b in, 11b out)
// follow the published design; the treatment of the 17th sample is this
// implementation's choice.
module mmpd
  import cdr_pkg::*;
#(
  parameter int unsigned NS  = N_OUT,
  parameter int unsigned NPD = N_PD,
  parameter int unsigned XW  = XPD_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [XW-1:0]   xp [NS],
  input  logic        [CNT_W-1:0] xp_cnt,
  input  logic        [NS-1:0]   a,
  input  logic        [CNT_W-1:0] a_cnt,
  output logic signed [XW:0]     pd [NPD],
  output logic        [NPD-1:0]  pd_valid
);

  logic signed [XW-1:0] x_last;      // last valid xp of the previous word
  logic signed [XW:0]   diff [NPD];  // speculative x(k-1) - x(k)
  logic                 a_last;      // last valid decision of the previous word
  logic signed [XW-1:0] x_last_nxt;
  logic                 a_last_nxt;

  always_comb begin
    x_last_nxt = x_last;
    for (int k = 0; k < NS; k++) begin
      if (k < int'(xp_cnt)) x_last_nxt = xp[k];
    end
    a_last_nxt = a_last;
    for (int k = 0; k < NS; k++) begin
      if (k < int'(a_cnt)) a_last_nxt = a[k];
    end
    // Resolve the sign with the decisions that have just arrived.
    pd[0] = a_last ? diff[0] : -diff[0];
    for (int k = 1; k < NPD; k++) begin
      pd[k] = a[k-1] ? diff[k] : -diff[k];
    end
    for (int k = 0; k < NPD; k++) pd_valid[k] = (k < int'(a_cnt));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_last   <= '0;
      a_last   <= 1'b0;
      for (int k = 0; k < NPD; k++) diff[k] <= '0;
    end else begin
      // Sample and decision counts stay within the slots.
      assert (int'(xp_cnt) <= NS && int'(a_cnt) <= NS);
      x_last <= x_last_nxt;
      diff[0] <= (XW+1)'(x_last) - (XW+1)'(xp[0]);
      for (int k = 1; k < NPD; k++) begin
        diff[k] <= (XW+1)'(xp[k-1]) - (XW+1)'(xp[k]);
      end
      a_last <= a_last_nxt;
    end
  end


endmodule
