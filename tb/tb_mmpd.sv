// tb_mmpd: checks the speculative Mueller-Muller phase detector.
// Random sample words (15..17 valid) are applied on xp and the matching
// random decisions one clock later on a, as the DFE delivers them. The
// reference keeps the whole sample and decision history and computes
// pd(k) = (x(k-1) - x(k)) * A(k-1), with slot 0 paired to the previous
// word's last valid sample and decision. Results are due one clock after
// the samples, in the same cycle as the decisions; validity must mark the
// slots below the count (first 16).
`timescale 1ns/1ps
module tb_mmpd;
  import cdr_pkg::*;

  logic                    clk = 0, rst_n;
  logic signed [XPD_W-1:0] xp [N_OUT];
  logic    [CNT_W-1:0]     xp_cnt, a_cnt;
  logic    [N_OUT-1:0]     a;
  logic signed [PD_W-1:0]  pd [N_PD];
  logic    [N_PD-1:0]      pd_valid;
  int checks = 0, failures = 0;

  mmpd dut (.clk(clk), .rst_n(rst_n), .xp(xp), .xp_cnt(xp_cnt), .a(a), .a_cnt(a_cnt),
            .pd(pd), .pd_valid(pd_valid));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NC = 500;
  int wx [NC][N_OUT];
  bit wa [NC][N_OUT];
  int wn [NC];

  initial begin
    int lx, la;
    for (int c = 0; c < NC; c++) begin
      wn[c] = 15 + $urandom_range(0, 2);
      for (int k = 0; k < N_OUT; k++) begin
        wx[c][k] = int'($urandom_range(0, 1000)) - 500;
        wa[c][k] = $urandom_range(0, 1);
      end
    end
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    for (int k = 0; k < N_OUT; k++) xp[k] = '0;
    a = '0; xp_cnt = '0; a_cnt = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    lx = 0; la = 0;
    for (int c = 0; c < NC + 1; c++) begin
      @(negedge clk);
      if (c < NC) begin
        for (int k = 0; k < N_OUT; k++) xp[k] = XPD_W'(wx[c][k]);
        xp_cnt = CNT_W'(wn[c]);
      end
      if (c >= 1) begin
        for (int k = 0; k < N_OUT; k++) a[k] = wa[c-1][k];
        a_cnt = CNT_W'(wn[c-1]);
      end
      #0.1;
      // The result for word c-1 is due as soon as its decisions arrive.
      if (c >= 1) begin
        int w;
        w = c - 1;
        for (int k = 0; k < N_PD; k++) begin
          int px, pa, e;
          px = (k == 0) ? lx : wx[w][k-1];
          pa = (k == 0) ? la : int'(wa[w][k-1]);
          e  = pa ? (px - wx[w][k]) : (wx[w][k] - px);
          checks++;
          if (pd_valid[k] != (k < wn[w]) || (k < wn[w] && int'(pd[k]) != e)) begin
            failures++;
            if (failures < 10) $display("word %0d slot %0d: pd %0d/%0d valid %0d", w, k, pd[k], e, pd_valid[k]);
          end
        end
        lx = wx[w][wn[w]-1];
        la = wa[w][wn[w]-1];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
