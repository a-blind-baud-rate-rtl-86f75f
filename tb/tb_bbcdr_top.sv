// tb_bbcdr_top: end-to-end test of the blind baud-rate receiver at its
// default parameters.
//
// The testbench models what lies in front of the digital part: a PRBS-7
// transmitter whose bit period differs from the sampling period by a chosen
// frequency offset (in ppm, positive = transmitter faster), sinusoidal
// jitter on the data edges, an ideal channel with an optional post-cursor,
// four interleaved 1UI integrate-and-dump circuits (the exact integral of
// the NRZ waveform over each sampling UI) and four 5-bit ADCs with slightly
// different gains and a little noise. The ADC codes drive bbcdr_top.
//
// Checks, per scenario, after the loop has settled:
//   - every recovered bit obeys the PRBS-7 recurrence b(k) = b(k-6)^b(k-7)
//     (one check per word, which fails on any bit error);
//   - the number of recovered bits matches the number of transmitted bits
//     in the same time, 16*cycles*(1+ppm), within 3 bits.
// Mechanisms counted over the whole run, each must occur: words with a
// dropped sample (15 bits), words with an extra sample (17 bits), words
// with 16 bits, detector-driven phase moves in both directions, and
// decisions in which the second DFE tap changed the outcome (channel with
// post-cursor scenario).
`timescale 1ps/1ps
module tb_bbcdr_top;
  import cdr_pkg::*;

  localparam int TAP_W = 8;
  localparam int INT_W = 18;
  localparam real UI_PS = 100.0;
  // Flat-top level B of the 2UI pulse response in DFE input units:
  // a full-scale 2UI sample is 2*31*32/16 = 124 = 2B, times the ADC gain.
  localparam real B_LVL = 62.0 * 0.95;

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
  int n_drop = 0, n_extra = 0, n_norm = 0, n_up = 0, n_down = 0, n_h2 = 0;

  // Stimulus state.
  bit   prbs [127];
  real  ppm, jit_amp, jit_per, post;
  real  t_bit;                 // data bit period in sampling UIs
  real  gain [N_ADC];
  longint n_smp;               // index of the next blind sample
  real  ph0;

  function automatic real dval(longint i);
    return prbs[int'(i % 127)] ? 1.0 : -1.0;
  endfunction

  // Exact integral over [t0,t1] of the received waveform
  // r(t) = d(t) + post*d(t - 1 bit period), in sampling UIs.
  function automatic real integrate(real t0, real t1);
    real acc = 0.0, lo, hi;
    longint i0, i1;
    i0 = longint'($floor(t0 / t_bit));
    i1 = longint'($floor(t1 / t_bit));
    for (longint i = i0; i <= i1; i++) begin
      lo = i * t_bit;       if (lo < t0) lo = t0;
      hi = (i + 1) * t_bit; if (hi > t1) hi = t1;
      if (hi > lo) acc += (dval(i) + post * dval(i - 1 + 127*4)) * (hi - lo);
    end
    return acc;
  endfunction

  function automatic logic [ADC_W-1:0] adc_conv(real v, real g);
    real c;
    int  q;
    c = 15.5 + 15.5 * g * v + (real'($urandom_range(0, 100)) - 50.0) / 100.0;
    q = int'($floor(c + 0.5));
    if (q < 0) q = 0;
    if (q > 31) q = 31;
    return ADC_W'(q);
  endfunction

  // New ADC codes half a period before each sampling edge.
  always @(negedge clk_adc) begin
    for (int j = 0; j < N_ADC; j++) begin
      real tc, jit;
      tc  = real'(n_smp) + ph0;
      jit = jit_amp / 2.0 * $sin(2.0 * 3.14159265358979 * tc / jit_per);
      adc[j] = adc_conv(integrate(tc - 1.0 + jit, tc + jit) / (1.0 + post), gain[j]);
      n_smp++;
    end
  end

  // Recovered bit checking.
  bit     measure;
  bit [6:0] hist;
  int     nhist;
  longint bits_rx;
  int     word_err;
  int     prev_phi;

  always @(posedge clk_cdr) begin
    if (rst_n && a_cnt != 0) begin
      word_err = 0;
      if (measure) begin
        if (a_cnt == 15) n_drop++;
        else if (a_cnt == 17) n_extra++;
        else if (a_cnt == 16) n_norm++;
      end
      for (int k = 0; k < int'(a_cnt); k++) begin
        if (nhist >= 7 && (a[k] != (hist[5] ^ hist[6]))) word_err++;
        hist = {hist[5:0], a[k]};
        if (nhist < 7) nhist++;
      end
      if (measure) begin
        checks++;
        bits_rx += a_cnt;
        if (word_err != 0) begin
          failures++;
          if (failures < 10) $display("  bit errors %0d in word, a_cnt=%0d phi=%0d t=%0t",
                                      word_err, a_cnt, phi, $time);
        end
      end
    end
  end

  // Mechanism counters from inside the loop.
  always @(posedge clk_cdr) begin
    if (rst_n && measure) begin
      int s;
      s = 0;
      for (int k = 0; k < N_PD; k++)
        if (dut.u_cdr.pd_valid[k]) s += int'(dut.u_cdr.pd[k]);
      if (s > 0) n_down++;
      if (s < 0) n_up++;
      // Second tap decisive: the decision differs from the one-tap decision.
      for (int k = 0; k < int'(dut.u_cdr.x_cnt); k++) begin
        if (h2 != 0) begin
          int e1;
          e1 = int'(dut.u_cdr.xd[k]);
          if ((e1 + int'(h1) + int'(h2) >= 0) != (e1 + int'(h1) - int'(h2) >= 0)) n_h2++;
        end
      end
    end
  end

  task automatic run(input real ppm_i, input real jpp, input real jper,
                     input real post_i, input int settle, input int meas);
    longint bits_exp;
    longint smp0;
    ppm = ppm_i; jit_amp = jpp; jit_per = jper; post = post_i;
    t_bit = 1.0 / (1.0 + ppm * 1e-6);
    // Fixed taps that keep the eye open for any blind-sample offset
    // (linear interpolation leaves h1 between 0.75B and B, h2 up to B/4).
    h1 = TAP_W'(int'(B_LVL * (0.875 + post) / (1.0 + post)));
    h2 = TAP_W'(int'(B_LVL * (0.125 + post) / (1.0 + post)));
    ph0 = real'($urandom_range(0, 99)) / 100.0;
    measure = 0;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #50 rst_n = 0;
    repeat (8) @(posedge clk_adc);
    rst_n = 1;
    nhist = 0;
    repeat (settle) @(posedge clk_cdr);
    bits_rx = 0;
    smp0 = n_smp;
    measure = 1;
    repeat (meas) @(posedge clk_cdr);
    measure = 0;
    bits_exp = longint'(real'(n_smp - smp0) * (1.0 + ppm * 1e-6));
    checks++;
    if (bits_rx > bits_exp + 3 || bits_rx < bits_exp - 3) begin
      failures++;
      $display("  bit count %0d, expected %0d", bits_rx, bits_exp);
    end
    $display("scenario ppm=%0.0f jit=%0.2fUIpp post=%0.2f: bits=%0d expected=%0d freq=%0d failures so far=%0d",
             ppm, jpp, post, bits_rx, bits_exp, freq, failures);
  endtask

  initial begin
    bit [6:0] lfsr = 7'h7f;
    for (int i = 0; i < 127; i++) begin
      prbs[i] = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], prbs[i]};
    end
    for (int j = 0; j < N_ADC; j++) gain[j] = 0.93 + 0.015 * j;
    n_smp = 0;
    for (int j = 0; j < N_ADC; j++) adc[j] = '0;
    h1 = '0; h2 = '0;
    rst_n = 0;
    run(   0.0, 0.20,  40.0, 0.0,  3000, 2000);
    run(-300.0, 0.10, 400.0, 0.0,  3000, 3000);
    run( 300.0, 0.19,  25.0, 0.0,  3000, 3000);
    run(1000.0, 0.05,  60.0, 0.0,  4000, 3000);
    run(-1000.0, 0.05, 60.0, 0.0,  4000, 3000);
    run( 200.0, 0.0,  100.0, 0.20, 3000, 2000);
    checks++; if (n_drop  == 0) begin failures++; $display("  no dropped sample seen"); end
    checks++; if (n_extra == 0) begin failures++; $display("  no extra sample seen"); end
    checks++; if (n_norm  == 0) begin failures++; $display("  no 16-bit word seen"); end
    checks++; if (n_up == 0 || n_down == 0) begin failures++; $display("  detector one-sided"); end
    checks++; if (n_h2 == 0) begin failures++; $display("  second tap never decisive"); end
    $display("mechanisms: drop=%0d extra=%0d normal=%0d pd_up=%0d pd_down=%0d h2_decisive=%0d",
             n_drop, n_extra, n_norm, n_up, n_down, n_h2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd400 * 64'd100_000 * 64'd100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
