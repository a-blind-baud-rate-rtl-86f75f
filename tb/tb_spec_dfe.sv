// tb_spec_dfe: checks the speculative DFE against a plain serial DFE.
// Random samples, taps and counts (15, 16, 17) are applied; the reference
// computes each decision one after the other as sign(x - h1*a1 - h2*a2)
// with the actual previous decisions (carried across words). One clock
// later the decision bits, the count and the zeros in unused slots must
// match. A second phase uses data built as x = A(k)*m + h1*A(k-1) + h2*A(k-2)
// so that the taps decide the outcome, and checks the bits are recovered.
`timescale 1ns/1ps
module tb_spec_dfe;
  import cdr_pkg::*;

  localparam int TAP_W = 8;
  logic                     clk = 0, rst_n;
  logic signed [XDFE_W-1:0] xd [N_OUT];
  logic    [CNT_W-1:0]      xd_cnt;
  logic signed [TAP_W-1:0]  h1, h2;
  logic    [N_OUT-1:0]      a;
  logic    [CNT_W-1:0]      a_cnt;
  int checks = 0, failures = 0;

  spec_dfe dut (.clk(clk), .rst_n(rst_n), .xd(xd), .xd_cnt(xd_cnt), .h1(h1), .h2(h2),
                .a(a), .a_cnt(a_cnt));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit r1 = 0, r2 = 0;      // reference decision history
  bit t1 = 0, t2 = 0;      // transmitted history (phase 2)

  initial begin
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    for (int k = 0; k < N_OUT; k++) xd[k] = '0;
    xd_cnt = '0; h1 = '0; h2 = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    for (int c = 0; c < 800; c++) begin
      int n, th1, th2;
      bit [N_OUT-1:0] exp_a;
      bit [N_OUT-1:0] sent;
      @(negedge clk);
      n   = 15 + $urandom_range(0, 2);
      th1 = (c < 400) ? int'($urandom_range(0, 120)) - 60 : 50;
      th2 = (c < 400) ? int'($urandom_range(0, 60)) - 30 : 12;
      h1 = TAP_W'(th1); h2 = TAP_W'(th2);
      xd_cnt = CNT_W'(n);
      exp_a = '0;
      if (c == 400) begin t1 = r1; t2 = r2; end
      for (int k = 0; k < N_OUT; k++) begin
        int v, e;
        if (c < 400) v = int'($urandom_range(0, 255)) - 128;
        else begin
          sent[k] = $urandom_range(0, 1);
          v = (sent[k] ? 20 : -20) + (t1 ? th1 : -th1) + (t2 ? th2 : -th2);
          if (k < n) begin t2 = t1; t1 = sent[k]; end
        end
        xd[k] = XDFE_W'(v);
        if (k < n) begin
          e = v - (r1 ? th1 : -th1) - (r2 ? th2 : -th2);
          exp_a[k] = (e >= 0);
          r2 = r1; r1 = exp_a[k];
        end
      end
      @(posedge clk);
      #0.1;
      checks++;
      if (a !== exp_a || int'(a_cnt) != n) begin
        failures++;
        if (failures < 10) $display("cycle %0d: a=%h expected %h cnt %0d/%0d", c, a, exp_a, a_cnt, n);
      end
      if (c >= 400) begin
        checks++;
        if ((a & ((17'h1 << n) - 1)) != (sent & ((17'h1 << n) - 1))) begin
          failures++;
          if (failures < 10) $display("cycle %0d: recovered %h sent %h", c, a, sent);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
