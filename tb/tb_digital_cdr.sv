// tb_digital_cdr: word-level test of the digital CDR on its own clock.
//
// Part 1, latency: with every code at full scale the recovered bits are
// all ones; one word of zero codes must appear as zero bits exactly three
// clocks after it is applied (2UI sum, interpolator, DFE registers).
// Part 2, tracking: words of 16 blind 1UI I&D codes are generated from a
// PRBS-7 stream whose bit period differs from the sampling period by
// -500ppm and then +500ppm (integrate-and-dump computed exactly, 5-bit
// quantisation, ideal channel). After settling, every recovered bit must
// obey the PRBS-7 recurrence, and the number of recovered bits must match
// the number of transmitted bits within 3; words of 15 and of 17 bits must
// both have occurred.
`timescale 1ns/1ps
module tb_digital_cdr;
  import cdr_pkg::*;

  localparam int TAP_W = 8, INT_W = 18;
  localparam real B_LVL = 62.0 * 0.95;

  logic                    clk = 0, rst_n;
  logic        [ADC_W-1:0] code [N_PAR];
  logic signed [TAP_W-1:0] h1, h2;
  logic        [N_OUT-1:0] a;
  logic        [CNT_W-1:0] a_cnt;
  logic        [PHI_W-1:0] phi;
  logic signed [INT_W-1:0] freq;
  int checks = 0, failures = 0;

  digital_cdr dut (.clk(clk), .rst_n(rst_n), .code(code), .h1(h1), .h2(h2),
                   .a(a), .a_cnt(a_cnt), .phi(phi), .freq(freq));

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit     prbs [127];
  real    t_bit, ph0;
  longint n_smp;

  function automatic real integ(real t0, real t1);
    real acc = 0.0, lo, hi;
    longint i0, i1;
    i0 = longint'($floor(t0 / t_bit));
    i1 = longint'($floor(t1 / t_bit));
    for (longint i = i0; i <= i1; i++) begin
      lo = i * t_bit;       if (lo < t0) lo = t0;
      hi = (i + 1) * t_bit; if (hi > t1) hi = t1;
      if (hi > lo) acc += (prbs[int'(i % 127)] ? 1.0 : -1.0) * (hi - lo);
    end
    return acc;
  endfunction

  task automatic next_word();
    for (int i = 0; i < N_PAR; i++) begin
      int q;
      real tc;
      tc = real'(n_smp) + ph0;
      q = int'($floor(15.5 + 15.5 * 0.95 * integ(tc - 1.0, tc) + 0.5));
      if (q < 0) q = 0;
      if (q > 31) q = 31;
      code[i] = ADC_W'(q);
      n_smp++;
    end
  endtask

  task automatic track(real ppm, int settle, int meas, ref int n15, ref int n17);
    bit [6:0] hist;
    int nh, err_words;
    longint rx, smp0, expd;
    t_bit = 1.0 / (1.0 + ppm * 1e-6);
    ph0 = 0.37;
    n_smp = 0;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    @(negedge clk);
    next_word();
    @(negedge clk) rst_n = 1;
    nh = 0; rx = 0; err_words = 0; smp0 = 0;
    for (int c = 0; c < settle + meas; c++) begin
      @(negedge clk);
      if (c == settle) smp0 = n_smp;
      if (c >= settle + 3) begin
        int we;
        we = 0;
        rx += a_cnt;
        if (a_cnt == 15) n15++;
        if (a_cnt == 17) n17++;
        for (int k = 0; k < int'(a_cnt); k++) begin
          if (nh >= 7 && a[k] != (hist[5] ^ hist[6])) we++;
          hist = {hist[5:0], a[k]};
          if (nh < 7) nh++;
        end
        checks++;
        if (we != 0) failures++;
      end
      next_word();
    end
    expd = longint'(real'(n_smp - smp0 - 3*16) * (1.0 + ppm * 1e-6));
    checks++;
    if (rx > expd + 3 || rx < expd - 3) begin
      failures++;
      $display("ppm %0.0f: %0d bits recovered, %0d expected", ppm, rx, expd);
    end
    $display("ppm %0.0f: %0d bits, expected %0d, freq %0d", ppm, rx, expd, freq);
  endtask

  initial begin
    bit [6:0] lfsr = 7'h7f;
    int n15 = 0, n17 = 0, lat;
    for (int i = 0; i < 127; i++) begin
      prbs[i] = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], prbs[i]};
    end
    h1 = TAP_W'(int'(B_LVL * 0.875));
    h2 = TAP_W'(int'(B_LVL * 0.125));

    // Part 1: latency.
    rst_n = 0;
    for (int i = 0; i < N_PAR; i++) code[i] = 5'd31;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (6) @(negedge clk);
    for (int i = 0; i < N_PAR; i++) code[i] = 5'd0;
    lat = -1;
    for (int c = 1; c <= 8; c++) begin
      @(negedge clk);
      for (int i = 0; i < N_PAR; i++) code[i] = 5'd31;
      if (lat < 0 && a_cnt != 0 && a[8] == 1'b0) lat = c;
    end
    checks++;
    if (lat != 3) begin
      failures++;
      $display("latency %0d clocks, expected 3", lat);
    end

    // Part 2: tracking with frequency offset.
    track(-500.0, 3000, 2000, n15, n17);
    track( 500.0, 3000, 2000, n15, n17);
    checks++;
    if (n15 == 0 || n17 == 0) begin
      failures++;
      $display("no dropped (%0d) or no extra (%0d) sample", n15, n17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
