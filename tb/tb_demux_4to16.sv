// tb_demux_4to16: checks the 4:16 demultiplexer together with clk_div4,
// which supplies its load strobe. ADC j is fed the code of global sample
// 4m+j (a counter modulo 32), so every word must hold 16 consecutive sample
// codes with the oldest in lane 0, start on a multiple of 16 samples, and
// advance by exactly 16 samples from one CDR clock edge to the next.
`timescale 1ns/1ps
module tb_demux_4to16;
  import cdr_pkg::*;

  logic             clk_fast = 0, rst_n, clk_out, load;
  logic [ADC_W-1:0] adc  [N_ADC];
  logic [ADC_W-1:0] word [N_PAR];
  int checks = 0, failures = 0;
  int smp;

  clk_div4 u_div (.clk_fast(clk_fast), .rst_n(rst_n), .clk_out(clk_out), .load(load));
  demux_4to16 dut (.clk_fast(clk_fast), .rst_n(rst_n), .load(load), .adc(adc), .word(word));

  always #1 clk_fast = ~clk_fast;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample 4m+j is on ADC j during fast cycle m after reset.
  always @(negedge clk_fast) begin
    for (int j = 0; j < N_ADC; j++) adc[j] <= ADC_W'((smp + j) % 32);
    smp <= smp + N_ADC;
  end

  initial begin
    int first, prev_first;
    smp = 0;
    for (int j = 0; j < N_ADC; j++) adc[j] = '0;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    repeat (3) @(posedge clk_fast);
    #0.1 rst_n = 1;
    smp = 0;   // the next falling edge presents samples 0..3
    prev_first = -1;
    repeat (2) @(posedge clk_out);
    for (int c = 0; c < 100; c++) begin
      @(posedge clk_out);
      first = int'(word[0]);
      for (int i = 0; i < N_PAR; i++) begin
        checks++;
        if (int'(word[i]) != (first + i) % 32) begin
          failures++;
          if (failures < 10) $display("word %0d lane %0d: %0d, lane 0 is %0d", c, i, word[i], first);
        end
      end
      checks++;
      if (first % 16 != 0 || (prev_first >= 0 && first != (prev_first + 16) % 32)) begin
        failures++;
        if (failures < 10) $display("word %0d starts at %0d after %0d", c, first, prev_first);
      end
      prev_first = first;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
