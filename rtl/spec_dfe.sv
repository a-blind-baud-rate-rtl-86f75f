// spec_dfe: speculative (loop-unrolled) two-tap decision feedback
// equalizer that resolves up to 17 bits per cycle.
//
// For every slot k the four possible feedback values are subtracted in
// parallel from the sample before the previous decisions are known:
//     e(a1,a2) = xd[k] - a1*h1 - a2*h2,   a1, a2 in {-1,+1}
// giving four candidate decisions (sign of e, 1 for e >= 0). A chain of
// 4:1 multiplexers then picks, slot by slot, the candidate named by the
// two decisions before it; slot 0 uses the last two valid decisions of
// the previous word. Only this mux chain is on the feedback path.
// Decisions are bits: 1 stands for +1, 0 for -1.
// Interface: xd[] are the interpolated samples scaled by 1/16, xd_cnt of
// them valid (15..17); h1 and h2 are the fixed tap weights in the same
// units (there is no tap adaptation). a[] holds the decisions, a_cnt the
// number valid; invalid slots read 0. Registered, one cycle latency.
// Two fixed taps resolved speculatively follow the published design; the
// full unrolling over both taps, the 8-bit tap width and deciding a zero
// value as +1 are this implementation's choices.
module spec_dfe
  import cdr_pkg::*;
#(
  parameter int unsigned NS    = N_OUT,
  parameter int unsigned XW    = XDFE_W,
  parameter int unsigned TAP_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [XW-1:0]    xd [NS],
  input  logic        [CNT_W-1:0] xd_cnt,
  input  logic signed [TAP_W-1:0] h1,
  input  logic signed [TAP_W-1:0] h2,
  output logic        [NS-1:0]    a,
  output logic        [CNT_W-1:0] a_cnt
);

  localparam int unsigned EW = XW + 2;

  logic [3:0]    cand [NS];     // indexed by {a1, a2}
  logic [NS-1:0] dec;           // decision of each slot, valid or not
  logic [1:0]    hist;          // {A[-1], A[-2]} from the previous word
  logic [NS-1:0] a_nxt;
  logic [1:0]    hist_nxt;

  always_comb begin
    for (int k = 0; k < NS; k++) begin
      for (int c = 0; c < 4; c++) begin
        logic signed [EW-1:0] e;
        e = EW'(xd[k]);
        e = c[1] ? e - EW'(h1) : e + EW'(h1);
        e = c[0] ? e - EW'(h2) : e + EW'(h2);
        cand[k][c] = (e >= 0);
      end
    end

    a_nxt    = '0;
    hist_nxt = hist;
    for (int k = 0; k < NS; k++) begin
      // 4:1 mux selected by the two preceding decisions.
      dec[k]   = cand[k][hist_nxt];
      if (k < int'(xd_cnt)) begin
        a_nxt[k] = dec[k];
        hist_nxt = {dec[k], hist_nxt[1]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist  <= '0;
      a     <= '0;
      a_cnt <= '0;
    end else begin
      // A word never carries more samples than there are slots.
      assert (int'(xd_cnt) <= NS);
      hist  <= hist_nxt;
      a     <= a_nxt;
      a_cnt <= xd_cnt;
    end
  end


endmodule
