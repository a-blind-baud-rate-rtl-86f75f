// tb_iad2ui: checks the synthesis of 2UI I&D samples from 1UI samples.
// Random signed 1UI words are applied one per clock; one clock later each
// output lane must equal the sum of its own and the preceding sample, lane 0
// using the last sample of the previous word (a single-cycle latency check).
`timescale 1ns/1ps
module tb_iad2ui;
  import cdr_pkg::*;

  logic                  clk = 0, rst_n;
  logic signed [S_W-1:0] s [N_PAR];
  logic signed [Y_W-1:0] y [N_PAR];
  int checks = 0, failures = 0;
  int prev [N_PAR];
  int prev_last;

  iad2ui dut (.clk(clk), .rst_n(rst_n), .s(s), .y(y));

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    for (int i = 0; i < N_PAR; i++) s[i] = '0;
    repeat (2) @(posedge clk);
    #0.5 rst_n = 1;
    prev_last = 0;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      for (int i = 0; i < N_PAR; i++) begin
        int v;
        v = 2 * int'($urandom_range(0, 31)) - 31;
        s[i] = S_W'(v);
        prev[i] = v;
      end
      @(posedge clk);
      #0.1;
      for (int i = 0; i < N_PAR; i++) begin
        int exp_y;
        exp_y = prev[i] + ((i == 0) ? prev_last : prev[i-1]);
        checks++;
        if (int'(y[i]) != exp_y) begin
          failures++;
          if (failures < 10) $display("cycle %0d lane %0d: got %0d expected %0d", c, i, y[i], exp_y);
        end
      end
      prev_last = prev[N_PAR-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
