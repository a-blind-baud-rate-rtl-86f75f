// tb_loop_filter: checks the second-order loop filter and phase
// accumulator against an integer reference model.
// Random detector outputs with random valid masks are applied, first with
// a positive bias (phase must move down and wrap backwards), then negative
// (phase up, forward wraps, and the frequency register saturates), then
// unbiased. Each clock the reference computes
//   freq' = sat(freq - sum), step = -(sum >>> KP) + (freq >>> KI),
//   phase' = phase + step modulo 1UI, with the wrap direction,
// and phi, wrap and freq must match one clock after the inputs.
`timescale 1ns/1ps
module tb_loop_filter;
  import cdr_pkg::*;

  localparam int FRAC_W = 10, INT_W = 18, KP = 0, KI = 7;
  localparam int PH_W = PHI_W + FRAC_W;

  logic                    clk = 0, rst_n;
  logic signed [PD_W-1:0]  pd [N_PD];
  logic    [N_PD-1:0]      pd_valid;
  logic    [PHI_W-1:0]     phi;
  wrap_e                   wrap;
  logic signed [INT_W-1:0] freq;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_bwd = 0, n_sat = 0;

  loop_filter dut (.clk(clk), .rst_n(rst_n), .pd(pd), .pd_valid(pd_valid),
                   .phi(phi), .wrap(wrap), .freq(freq));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r_ph, r_fr, sum, step, imax, smax;
    int r_wrap;
    imax = (64'sd1 <<< (INT_W-1)) - 1;
    smax = (64'sd1 <<< (PH_W-1)) - 1;
    r_ph = 0; r_fr = 0;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    for (int k = 0; k < N_PD; k++) pd[k] = '0;
    pd_valid = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int bias;
      @(negedge clk);
      bias = (c < 800) ? 150 : (c < 2200) ? -400 : 0;
      sum = 0;
      for (int k = 0; k < N_PD; k++) begin
        int v;
        v = bias + int'($urandom_range(0, 1000)) - 500;
        pd[k] = PD_W'(v);
        pd_valid[k] = ($urandom_range(0, 15) != 0);
        if (pd_valid[k]) sum += v;
      end
      step = -(sum >>> KP) + (r_fr >>> KI);
      if (step > smax) step = smax;
      if (step < -smax) step = -smax;
      r_fr = r_fr - sum;
      if (r_fr > imax) begin r_fr = imax; n_sat++; end
      if (r_fr < -imax) begin r_fr = -imax; n_sat++; end
      r_ph = r_ph + step;
      r_wrap = 0;
      if (r_ph >= (64'sd1 <<< PH_W)) begin r_ph -= (64'sd1 <<< PH_W); r_wrap = 1; n_fwd++; end
      else if (r_ph < 0)            begin r_ph += (64'sd1 <<< PH_W); r_wrap = 2; n_bwd++; end
      @(posedge clk);
      #0.1;
      checks++;
      if (int'(phi) != int'(r_ph >>> FRAC_W) || int'(wrap) != r_wrap || longint'(freq) != r_fr) begin
        failures++;
        if (failures < 10) $display("cycle %0d: phi %0d/%0d wrap %0d/%0d freq %0d/%0d",
                                    c, phi, r_ph >>> FRAC_W, wrap, r_wrap, freq, r_fr);
      end
    end
    checks++;
    if (n_fwd == 0 || n_bwd == 0 || n_sat == 0) begin
      failures++;
      $display("mechanism missing: fwd %0d bwd %0d sat %0d", n_fwd, n_bwd, n_sat);
    end
    $display("wraps fwd=%0d bwd=%0d saturated cycles=%0d", n_fwd, n_bwd, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
