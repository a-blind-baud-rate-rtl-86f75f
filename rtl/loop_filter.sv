// loop_filter: second-order digital loop filter and phase accumulator that
// produce the average interpolation phase of the CDR.
//
// Each cycle the valid phase-detector outputs of the word are summed. A
// proportional path (sum >>> KP_SHIFT) and an integral path (a frequency
// register that accumulates the sum, read out >>> KI_SHIFT) are added and
// subtracted from a phase accumulator of PHI_W + FRAC_W bits that spans
// exactly 1UI; a positive detector output (late sampling) moves the phase
// earlier. The integral path tracks the frequency offset between data and
// sampling clock; its saturation at +-2^(INT_W-1) sets the largest offset
// the loop can follow (about +-1950ppm with the defaults). The step of one
// cycle is limited to less than half a UI.
// When the accumulator passes 1UI upward it wraps and reports WRAP_FWD
// (drop one sample); when it passes 0 downward it reports WRAP_BWD (add one
// sample). phi is the accumulator's top PHI_W bits.
// Timing: phi and wrap are registered and change together, one cycle after
// the detector outputs. Gains and widths are this design's choices.
module loop_filter
  import cdr_pkg::*;
#(
  parameter int unsigned NPD      = N_PD,
  parameter int unsigned PDW      = PD_W,
  parameter int unsigned FRAC_W   = 10,
  parameter int unsigned INT_W    = 18,
  parameter int unsigned KP_SHIFT = 0,
  parameter int unsigned KI_SHIFT = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [PDW-1:0]    pd [NPD],
  input  logic        [NPD-1:0]    pd_valid,
  output logic        [PHI_W-1:0]  phi,
  output wrap_e                    wrap,
  output logic signed [INT_W-1:0]  freq
);

  localparam int unsigned PH_W  = PHI_W + FRAC_W;
  localparam int unsigned SUM_W = PDW + $clog2(NPD) + 1;
  localparam int unsigned W     = (INT_W > PH_W ? INT_W : PH_W) + 3;
  localparam logic signed [W-1:0] ONE_UI   = W'(1) <<< PH_W;
  localparam logic signed [W-1:0] STEP_MAX = (W'(1) <<< (PH_W-1)) - W'(1);
  localparam logic signed [W-1:0] INT_MAX  = (W'(1) <<< (INT_W-1)) - W'(1);

  logic        [PH_W-1:0]  ph;
  logic signed [SUM_W-1:0] sum;
  logic signed [W-1:0]     freq_w, step, ph_w;
  logic signed [INT_W-1:0] freq_nxt;
  logic        [PH_W-1:0]  ph_nxt;
  wrap_e                   wrap_nxt;

  always_comb begin
    sum = '0;
    for (int k = 0; k < NPD; k++) begin
      if (pd_valid[k]) sum += SUM_W'(pd[k]);
    end

    // Integral path with saturation.
    freq_w = W'(freq) - W'(sum);
    if (freq_w > INT_MAX)       freq_w = INT_MAX;
    else if (freq_w < -INT_MAX) freq_w = -INT_MAX;
    freq_nxt = INT_W'(freq_w);

    // Proportional plus integral phase step, limited to under half a UI.
    step = -(W'(sum) >>> KP_SHIFT) + (W'(freq) >>> KI_SHIFT);
    if (step > STEP_MAX)       step = STEP_MAX;
    else if (step < -STEP_MAX) step = -STEP_MAX;

    ph_w = W'(ph) + step;
    if (ph_w >= ONE_UI) begin
      ph_w     = ph_w - ONE_UI;
      wrap_nxt = WRAP_FWD;
    end else if (ph_w < 0) begin
      ph_w     = ph_w + ONE_UI;
      wrap_nxt = WRAP_BWD;
    end else begin
      wrap_nxt = WRAP_NONE;
    end
    ph_nxt = PH_W'(ph_w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph   <= '0;
      freq <= '0;
      wrap <= WRAP_NONE;
    end else begin
      ph   <= ph_nxt;
      freq <= freq_nxt;
      wrap <= wrap_nxt;
    end
  end

  assign phi = ph[PH_W-1 -: PHI_W];

endmodule
