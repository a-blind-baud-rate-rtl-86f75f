// tb_clk_div4: checks the divide-by-four clock and the demux load strobe.
// Over 200 fast cycles after reset: clk_out must be high for two fast
// cycles and low for two, rise exactly every four fast cycles, and load
// must be high in exactly one of four cycles, the fast cycle that ends two
// fast edges before clk_out rises.
`timescale 1ns/1ps
module tb_clk_div4;
  logic clk_fast = 0, rst_n, clk_out, load;
  int checks = 0, failures = 0;

  clk_div4 dut (.clk_fast(clk_fast), .rst_n(rst_n), .clk_out(clk_out), .load(load));

  always #1 clk_fast = ~clk_fast;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_rise, last_load, n_rise;
    bit prev;
    rst_n = 1;   // a real falling edge, whatever rst_n held before
    #0.2 rst_n = 0;
    repeat (3) @(posedge clk_fast);
    #0.5 rst_n = 1;
    last_rise = -1; last_load = -1; n_rise = 0;
    prev = clk_out;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk_fast);
      // Reset ends between edges, so before falling edge c the counter
      // has seen c rising edges: expected count c mod 4.
      checks++;
      if (clk_out != ((c % 4) >= 2) || load != ((c % 4) == 3)) begin
        failures++;
        if (failures < 10) $display("fast cycle %0d: clk_out %0d load %0d", c, clk_out, load);
      end
      if (load) last_load = c;
      if (clk_out && !prev) begin
        n_rise++;
        checks++;
        if (last_rise >= 0 && c - last_rise != 4) failures++;
        if (last_load >= 0 && c - last_load != 3) failures++;   // load seen at c-3, rise at c
        last_rise = c;
      end
      prev = clk_out;
    end
    checks++;
    if (n_rise != 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
