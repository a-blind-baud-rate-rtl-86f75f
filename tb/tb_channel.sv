// tb_channel: the whole back end (bbcdr_top at its default parameters)
// receiving PRBS-7 through a lossy channel instead of an ideal one.
//
// The original chip was measured through a cable with about 10dB of total
// loss at 2.5GHz, counting the 2UI integrate-and-dump. The cable response
// itself is not known, so this testbench stands in a first-order low-pass
// channel. Its time constant TAU_UI = 1.116UI gives 6.1dB at 2.5GHz, and the
// 2UI I&D adds |sinc(0.5)| = -3.9dB, which makes 10dB in total. The stimulus
// is otherwise the one of tb_bbcdr_top: exact 1UI integration of the channel
// output, four 5-bit quantisers with gain mismatch and noise, frequency
// offset and a small sinusoidal jitter.
//
// The DFE taps are fixed and worked out here from the channel. P2(t) is the
// 2UI-integrated pulse response of one bit. With the blind sampling grid a
// fraction f of a UI away from the interpolated sample, the sample sees
// Pe(t) = (1-f)*P2(t-f) + f*P2(t+1-f). The Mueller-Muller loop settles where
// Pe(t) = Pe(t+1), and Pe(t+1), Pe(t+2) there are the ideal taps for that f.
// As f drifts with the frequency offset, the fixed taps are the pair that
// keeps the eye widest at the worst f.
//
// Checks, at 0, +300 and -300ppm over 20000 words each: the number of
// recovered bits matches the number sent, and at most MAX_ERR_WORDS words
// hold a bit that breaks the PRBS-7 recurrence. The margin left by this
// channel is small, so rare errors are expected: the bound keeps the error
// rate below about 3e-5. The +1000ppm run is printed but not checked, since
// near the loop's frequency limit this channel sometimes makes it slip.
`timescale 1ps/1ps
module tb_channel;
  import cdr_pkg::*;

  localparam int  TAP_W  = 8;
  localparam int  INT_W  = 18;
  localparam real UI_PS  = 100.0;
  localparam real B_LVL  = 62.0 * 0.95;
  localparam real TAU_UI = 1.116;
  localparam int  HIST   = 14;        // bits of channel memory modelled
  localparam int  MAX_ERR_WORDS = 10;

  logic                    clk_adc = 1'b0;
  logic                    rst_n;
  logic        [ADC_W-1:0] adc [N_ADC];
  logic signed [TAP_W-1:0] h1, h2;
  logic                    clk_cdr;
  logic        [N_OUT-1:0] a;
  logic        [CNT_W-1:0] a_cnt;
  logic        [PHI_W-1:0] phi;
  logic signed [INT_W-1:0] freq;

  bbcdr_top dut (
    .clk_adc(clk_adc), .rst_n(rst_n), .adc(adc), .h1(h1), .h2(h2),
    .clk_cdr(clk_cdr), .a(a), .a_cnt(a_cnt), .phi(phi), .freq(freq)
  );

  always #(2*UI_PS) clk_adc = ~clk_adc;   // 2.5GHz, 4 samples per period

  int checks = 0, failures = 0;

  bit   prbs [127];
  real  ppm, jit_amp, jit_per;
  real  t_bit;                 // data bit period in sampling UIs
  real  gain [N_ADC];
  longint n_smp;
  real  ph0;

  function automatic real dval(longint i);
    return prbs[int'(i % 127)] ? 1.0 : -1.0;
  endfunction

  // Integral of the channel step response 1 - exp(-t/tau), from 0 to t.
  function automatic real r_int(real t);
    if (t <= 0.0) return 0.0;
    return t - TAU_UI * (1.0 - $exp(-t / TAU_UI));
  endfunction

  // Integral of the response to one bit of width w starting at 0, up to t.
  function automatic real g_int(real t, real w);
    return r_int(t) - r_int(t - w);
  endfunction

  // Exact integral over [t0,t1] of the channel output, in sampling UIs.
  function automatic real integrate(real t0, real t1);
    real acc = 0.0;
    longint i1;
    i1 = longint'($floor(t1 / t_bit));
    for (longint i = i1 - HIST; i <= i1; i++)
      acc += dval(i + 127*1000) * (g_int(t1 - i * t_bit, t_bit) - g_int(t0 - i * t_bit, t_bit));
    return acc;
  endfunction

  // 2UI-integrated pulse response of one bit, sample ending at t.
  function automatic real p2(real t);
    return g_int(t, 1.0) - g_int(t - 2.0, 1.0);
  endfunction

  function automatic real pe(real t, real f);
    return (1.0 - f) * p2(t - f) + f * p2(t + 1.0 - f);
  endfunction

  // Taps that give the widest worst-case eye over the blind offset f, in
  // DFE input units. For each f the loop's lock point is found by bisection,
  // and the eye is the main cursor minus all residual intersymbol
  // interference (pre-cursors, tap errors and the uncancelled tail).
  task automatic compute_taps(output int t1, output int t2);
    real cur [21][17];
    real best = -1.0e9;
    for (int k = 0; k < 21; k++) begin
      real f, lo, hi, m;
      f = real'(k) / 20.0;
      lo = 0.5; hi = 3.0;
      for (int it = 0; it < 50; it++) begin
        m = (lo + hi) / 2.0;
        if (pe(m, f) < pe(m + 1.0, f)) lo = m; else hi = m;
      end
      for (int c = 0; c < 17; c++) cur[k][c] = B_LVL * pe(lo + real'(c - 3), f);
    end
    for (int c1 = 0; c1 < 64; c1++) begin
      for (int c2 = 0; c2 < 64; c2++) begin
        real w = 1.0e9;
        for (int k = 0; k < 21; k++) begin
          real isi = 0.0;
          for (int c = 0; c < 17; c++)
            if (c != 3 && c != 4 && c != 5) isi += (cur[k][c] < 0.0) ? -cur[k][c] : cur[k][c];
          isi += (cur[k][4] > c1) ? cur[k][4] - c1 : c1 - cur[k][4];
          isi += (cur[k][5] > c2) ? cur[k][5] - c2 : c2 - cur[k][5];
          if (cur[k][3] - isi < w) w = cur[k][3] - isi;
        end
        if (w > best) begin
          best = w; t1 = c1; t2 = c2;
        end
      end
    end
    $display("worst-case eye %0.1f of a main cursor near %0.1f", best, cur[10][3]);
  endtask

  function automatic logic [ADC_W-1:0] adc_conv(real v, real g);
    real c;
    int  q;
    c = 15.5 + 15.5 * g * v + (real'($urandom_range(0, 100)) - 50.0) / 100.0;
    q = int'($floor(c + 0.5));
    if (q < 0) q = 0;
    if (q > 31) q = 31;
    return ADC_W'(q);
  endfunction

  always @(negedge clk_adc) begin
    for (int j = 0; j < N_ADC; j++) begin
      real tc, jit;
      tc  = real'(n_smp) + ph0;
      jit = jit_amp / 2.0 * $sin(2.0 * 3.14159265358979 * tc / jit_per);
      adc[j] = adc_conv(integrate(tc - 1.0 + jit, tc + jit), gain[j]);
      n_smp++;
    end
  end

  bit       measure;
  bit [6:0] hist;
  int       nhist;
  longint   bits_rx;
  int       word_err;
  int       err_words;

  always @(posedge clk_cdr) begin
    if (rst_n && a_cnt != 0) begin
      word_err = 0;
      for (int k = 0; k < int'(a_cnt); k++) begin
        if (nhist >= 7 && (a[k] != (hist[5] ^ hist[6]))) word_err++;
        hist = {hist[5:0], a[k]};
        if (nhist < 7) nhist++;
      end
      if (measure) begin
        bits_rx += a_cnt;
        if (word_err != 0) begin
          err_words++;
          if (err_words < 10) $display("  bit errors %0d in word, a_cnt=%0d phi=%0d t=%0t",
                                      word_err, a_cnt, phi, $time);
        end
      end
    end
  end

  task automatic scenario(input real ppm_i, input int words, input bit check);
    int e0;
    longint bits_exp, smp0;
    ppm = ppm_i;
    t_bit = 1.0 / (1.0 + ppm * 1e-6);
    ph0 = real'($urandom_range(0, 99)) / 100.0;
    measure = 0;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #50 rst_n = 0;
    repeat (8) @(posedge clk_adc);
    rst_n = 1;
    nhist = 0;
    repeat (3000) @(posedge clk_cdr);
    e0 = err_words;
    bits_rx = 0;
    smp0 = n_smp;
    measure = 1;
    repeat (words) @(posedge clk_cdr);
    measure = 0;
    bits_exp = longint'(real'(n_smp - smp0) * (1.0 + ppm * 1e-6));
    $display("ppm=%0.0f: %0d bits, %0d expected, %0d words with errors, freq=%0d",
             ppm, bits_rx, bits_exp, err_words - e0, freq);
    if (!check) $display("  (not checked)");
    if (check) begin
      checks += 2;
      if (bits_rx > bits_exp + 3 || bits_rx < bits_exp - 3) begin
        failures++;
        $display("  wrong bit count");
      end
      if (err_words - e0 > MAX_ERR_WORDS) begin
        failures++;
        $display("  too many words with errors");
      end
    end
  endtask

  initial begin
    bit [6:0] lfsr = 7'h7f;
    int t1, t2;
    for (int i = 0; i < 127; i++) begin
      prbs[i] = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], prbs[i]};
    end
    for (int j = 0; j < N_ADC; j++) gain[j] = 0.93 + 0.015 * j;
    for (int j = 0; j < N_ADC; j++) adc[j] = '0;
    n_smp = 0;
    err_words = 0;
    jit_amp = 0.1;
    jit_per = 1000.0;            // 10MHz
    compute_taps(t1, t2);
    h1 = TAP_W'(t1);
    h2 = TAP_W'(t2);
    $display("channel taps h1=%0d h2=%0d", t1, t2);
    rst_n = 0;
    scenario(0.0, 20000, 1);
    scenario(300.0, 20000, 1);
    scenario(-300.0, 20000, 1);
    scenario(1000.0, 20000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd120_000 * 64'd16 * 64'd100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
