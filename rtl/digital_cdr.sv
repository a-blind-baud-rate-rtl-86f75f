// digital_cdr: the blind baud-rate digital clock and data recovery loop.
//
// Input is one word of 16 blind 1UI I&D ADC codes per 625MHz cycle,
// sampled once per UI by a clock that is not locked to the data. The
// datapath, in pipeline order:
//   signed_conv  2*code - 31                     16 x 6b   (comb)
//   iad2ui       adjacent sums = 2UI I&D samples 16 x 7b   (1 cycle)
//   data_interp  linear interpolation at phi     17 x 13b  (1 cycle)
//   spec_dfe     x/16, speculative 2-tap DFE     17 x 1b   (1 cycle)
//   mmpd         x/8, speculative MM detector    16 x 11b  (with the DFE output)
//   loop_filter  2nd-order filter -> phi (5b)              (1 cycle)
// The interpolator, DFE, detector and loop filter form the timing
// recovery loop; a phase update reaches the interpolator output three
// cycles after the samples it was measured on. The ADC clock never moves.
// Outputs: a[] holds the recovered bits of a word (slot 0 oldest, 1 = one),
// a_cnt how many are valid: 16 normally, 15 when the phase wrapped upward
// (data slower than the sampling clock), 17 when it wrapped downward (data
// faster). Latency from code to a is three cycles. phi and freq expose the
// loop state. The DFE taps h1, h2 are static inputs: the design has no tap
// adaptation.
// The chain of blocks, the lane counts and the widths follow the published
// block diagram; register placement and loop gains are this design's.
module digital_cdr
  import cdr_pkg::*;
#(
  parameter int unsigned TAP_W    = 8,
  parameter int unsigned FRAC_W   = 10,
  parameter int unsigned INT_W    = 18,
  parameter int unsigned KP_SHIFT = 0,
  parameter int unsigned KI_SHIFT = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [ADC_W-1:0] code [N_PAR],
  input  logic signed [TAP_W-1:0] h1,
  input  logic signed [TAP_W-1:0] h2,
  output logic        [N_OUT-1:0] a,
  output logic        [CNT_W-1:0] a_cnt,
  output logic        [PHI_W-1:0] phi,
  output logic signed [INT_W-1:0] freq
);

  logic signed [S_W-1:0]    s   [N_PAR];
  logic signed [Y_W-1:0]    y   [N_PAR];
  logic signed [X_W-1:0]    x   [N_OUT];
  logic signed [XDFE_W-1:0] xd  [N_OUT];
  logic signed [XPD_W-1:0]  xp  [N_OUT];
  logic        [CNT_W-1:0]  x_cnt;
  logic signed [PD_W-1:0]   pd  [N_PD];
  logic        [N_PD-1:0]   pd_valid;
  wrap_e                    wrap;

  signed_conv #(.LANES(N_PAR)) u_conv (.code(code), .s(s));

  iad2ui #(.LANES(N_PAR)) u_iad2ui (.clk(clk), .rst_n(rst_n), .s(s), .y(y));

  data_interp #(.LANES(N_PAR)) u_interp (
    .clk(clk), .rst_n(rst_n), .y(y), .phi(phi), .wrap(wrap),
    .x(x), .x_cnt(x_cnt)
  );

  // Arithmetic right shifts: /8 for the detector, /16 for the DFE.
  always_comb begin
    for (int k = 0; k < N_OUT; k++) begin
      xp[k] = XPD_W'(x[k] >>> 3);
      xd[k] = XDFE_W'(x[k] >>> 4);
    end
  end

  spec_dfe #(.NS(N_OUT), .XW(XDFE_W), .TAP_W(TAP_W)) u_dfe (
    .clk(clk), .rst_n(rst_n), .xd(xd), .xd_cnt(x_cnt), .h1(h1), .h2(h2),
    .a(a), .a_cnt(a_cnt)
  );

  mmpd #(.NS(N_OUT), .NPD(N_PD), .XW(XPD_W)) u_mmpd (
    .clk(clk), .rst_n(rst_n), .xp(xp), .xp_cnt(x_cnt), .a(a), .a_cnt(a_cnt),
    .pd(pd), .pd_valid(pd_valid)
  );

  loop_filter #(
    .NPD(N_PD), .PDW(PD_W), .FRAC_W(FRAC_W), .INT_W(INT_W),
    .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)
  ) u_lf (
    .clk(clk), .rst_n(rst_n), .pd(pd), .pd_valid(pd_valid),
    .phi(phi), .wrap(wrap), .freq(freq)
  );

endmodule
