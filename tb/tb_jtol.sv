// tb_jtol: jitter tolerance sweep of the whole back end (bbcdr_top at its
// default parameters), in the manner of a measured jitter tolerance curve.
//
// The stimulus model is the one of tb_bbcdr_top: PRBS-7 data with a
// frequency offset, sinusoidal jitter, ideal channel, exact 1UI
// integrate-and-dump and four 5-bit quantisers with gain mismatch and noise.
// For jitter frequencies from 100kHz to 100MHz (10Gb/s, so jitter periods
// of 100000 to 100 UI) and offsets of -300, 0, +300 and +1000ppm, the sinusoidal
// jitter amplitude is raised step by step until a word with a bit error (or
// a wrong bit count) appears; the largest error-free amplitude is printed.
// Each point runs for at least two jitter periods and 2000 words.
// A check fails when the tolerance at a frequency is below 0.19UIpp (the
// high-frequency floor the original chip reports), or below 1UIpp at
// 100kHz and 1MHz, where the loop must track the jitter.
`timescale 1ps/1ps
module tb_jtol;
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

  // Run one point; returns 1 when it is error-free and the count is right.
  task automatic point(input real ppm_i, input real jpp, input real jper, output bit ok);
    int f0;
    longint bits_exp, smp0;
    ppm = ppm_i; jit_amp = jpp; jit_per = jper; post = 0.0;
    t_bit = 1.0 / (1.0 + ppm * 1e-6);
    h1 = TAP_W'(int'(B_LVL * 0.875));
    h2 = TAP_W'(int'(B_LVL * 0.125));
    ph0 = real'($urandom_range(0, 99)) / 100.0;
    measure = 0;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #50 rst_n = 0;
    repeat (8) @(posedge clk_adc);
    rst_n = 1;
    nhist = 0;
    repeat (3000) @(posedge clk_cdr);
    f0 = failures;
    bits_rx = 0;
    smp0 = n_smp;
    measure = 1;
    repeat ((int'(2.0 * jper / 16.0) > 2000) ? int'(2.0 * jper / 16.0) : 2000) @(posedge clk_cdr);
    measure = 0;
    bits_exp = longint'(real'(n_smp - smp0) * (1.0 + ppm * 1e-6));
    ok = (failures == f0) && (bits_rx <= bits_exp + 3) && (bits_rx >= bits_exp - 3);
    failures = f0;     // errors here only mark the edge of tolerance
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
    begin
      real freqs [6] = '{0.1e6, 1e6, 4e6, 10e6, 40e6, 100e6};
      real amps [14] = '{0.1, 0.15, 0.19, 0.25, 0.3, 0.4, 0.6, 1.0, 1.5, 2.0, 3.0, 4.0, 6.0, 8.0};
      real ppms [4] = '{-300.0, 0.0, 300.0, 1000.0};
      for (int p = 0; p < 4; p++) begin
        for (int f = 0; f < 6; f++) begin
          real tol;
          bit ok;
          tol = 0.0;
          for (int k = 0; k < 14; k++) begin
            point(ppms[p], amps[k], 10e9 / freqs[f], ok);
            if (!ok) break;
            tol = amps[k];
          end
          $display("JTOL ppm=%0.0f f=%0.1fMHz tolerance>=%0.2fUIpp", ppms[p], freqs[f] / 1e6, tol);
          checks++;
          if (tol < 0.19 || (f <= 1 && tol < 1.0)) failures++;
        end
      end
    end
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
