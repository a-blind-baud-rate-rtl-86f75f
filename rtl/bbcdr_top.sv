// bbcdr_top: digital part of the blind baud-rate ADC-based 10Gb/s receiver.
//
// The analog front end (four interleaved 1UI integrate-and-dump circuits
// and 5-bit ADCs clocked at 2.5GHz from a free-running 5GHz clock) lies
// outside this module: the four ADC codes and the 2.5GHz clock come in as
// ports. Inside, clk_div4 makes the 625MHz CDR clock, demux_4to16 forms
// words of 16 samples and digital_cdr recovers 15..17 bits per word.
// Interface: adc[j] is ADC j's code on each clk_adc edge (ADC j holds
// samples 4m+j); h1, h2 are the static DFE taps; a/a_cnt are the recovered
// bits of each word (slot 0 oldest) with their count, valid on rising
// edges of clk_cdr. phi and freq show the loop's phase and frequency
// estimate. Reset is asynchronous, active low, for both clocks.
// The partition (divider, demux, CDR) follows the published block diagram.
module bbcdr_top
  import cdr_pkg::*;
#(
  parameter int unsigned TAP_W    = 8,
  parameter int unsigned FRAC_W   = 10,
  parameter int unsigned INT_W    = 18,
  parameter int unsigned KP_SHIFT = 0,
  parameter int unsigned KI_SHIFT = 7
) (
  input  logic                    clk_adc,
  input  logic                    rst_n,
  input  logic        [ADC_W-1:0] adc [N_ADC],
  input  logic signed [TAP_W-1:0] h1,
  input  logic signed [TAP_W-1:0] h2,
  output logic                    clk_cdr,
  output logic        [N_OUT-1:0] a,
  output logic        [CNT_W-1:0] a_cnt,
  output logic        [PHI_W-1:0] phi,
  output logic signed [INT_W-1:0] freq
);

  logic             load;
  logic [ADC_W-1:0] word [N_PAR];

  clk_div4 u_div (.clk_fast(clk_adc), .rst_n(rst_n), .clk_out(clk_cdr), .load(load));

  demux_4to16 u_demux (
    .clk_fast(clk_adc), .rst_n(rst_n), .load(load), .adc(adc), .word(word)
  );

  digital_cdr #(
    .TAP_W(TAP_W), .FRAC_W(FRAC_W), .INT_W(INT_W),
    .KP_SHIFT(KP_SHIFT), .KI_SHIFT(KI_SHIFT)
  ) u_cdr (
    .clk(clk_cdr), .rst_n(rst_n), .code(word), .h1(h1), .h2(h2),
    .a(a), .a_cnt(a_cnt), .phi(phi), .freq(freq)
  );

endmodule
