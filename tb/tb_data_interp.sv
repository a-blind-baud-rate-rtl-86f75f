// tb_data_interp: checks the interpolator against a reference model.
// Random 2UI words, phases and wrap indications are applied; one clock
// later the count must be 15/16/17 for a forward/no/backward wrap and each
// valid slot must hold (32-phi)*y(n-1) + phi*y(n) for the blind pair the
// slot maps to (with the extra slot of a backward wrap taken between the
// last two samples of the previous word). Unused slots must read zero.
`timescale 1ns/1ps
module tb_data_interp;
  import cdr_pkg::*;

  logic                  clk = 0, rst_n;
  logic signed [Y_W-1:0] y [N_PAR];
  logic    [PHI_W-1:0]   phi;
  wrap_e                 wrap;
  logic signed [X_W-1:0] x [N_OUT];
  logic    [CNT_W-1:0]   x_cnt;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_bwd = 0;

  data_interp dut (.clk(clk), .rst_n(rst_n), .y(y), .phi(phi), .wrap(wrap),
                   .x(x), .x_cnt(x_cnt));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ext [N_PAR+2];       // y(-2) .. y(15)
  int h2 = 0, h1 = 0;      // y(-2), y(-1) for the next word
  int exp_x [N_OUT];
  int exp_cnt;

  function automatic int ip(int ya, int yb, int p);
    return (32 - p) * ya + p * yb;
  endfunction

  initial begin
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    for (int i = 0; i < N_PAR; i++) y[i] = '0;
    phi = '0; wrap = WRAP_NONE;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      int p, w;
      @(negedge clk);
      p = $urandom_range(0, 31);
      w = $urandom_range(0, 2);
      if (c < 3) p = (c == 0) ? 0 : 31;   // include the phase extremes
      phi  = PHI_W'(p);
      wrap = wrap_e'(w);
      ext[0] = h2; ext[1] = h1;
      for (int i = 0; i < N_PAR; i++) begin
        int v;
        v = int'($urandom_range(0, 124)) - 62;
        y[i] = Y_W'(v);
        ext[i+2] = v;
      end
      for (int k = 0; k < N_OUT; k++) exp_x[k] = 0;
      if (w == 1) begin
        exp_cnt = 15;
        for (int k = 0; k < 15; k++) exp_x[k] = ip(ext[k+2], ext[k+3], p);
        n_fwd++;
      end else if (w == 2) begin
        exp_cnt = 17;
        exp_x[0] = ip(ext[0], ext[1], p);
        for (int k = 0; k < 16; k++) exp_x[k+1] = ip(ext[k+1], ext[k+2], p);
        n_bwd++;
      end else begin
        exp_cnt = 16;
        for (int k = 0; k < 16; k++) exp_x[k] = ip(ext[k+1], ext[k+2], p);
      end
      h2 = ext[N_PAR];
      h1 = ext[N_PAR+1];
      @(posedge clk);
      #0.1;
      checks++;
      if (int'(x_cnt) != exp_cnt) begin
        failures++;
        $display("cycle %0d: count %0d expected %0d", c, x_cnt, exp_cnt);
      end
      for (int k = 0; k < N_OUT; k++) begin
        checks++;
        if (int'(x[k]) != exp_x[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d wrap %0d phi %0d slot %0d: got %0d expected %0d",
                                      c, w, p, k, x[k], exp_x[k]);
        end
      end
    end
    checks++;
    if (n_fwd == 0 || n_bwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
