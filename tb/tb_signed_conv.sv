// tb_signed_conv: checks the ADC code to signed integer conversion.
// Every code 0..31 is applied on every lane (rotated so lanes see
// different codes at once) and compared with 2*code-31 computed as an int.
`timescale 1ns/1ps
module tb_signed_conv;
  import cdr_pkg::*;

  logic        [ADC_W-1:0] code [N_PAR];
  logic signed [S_W-1:0]   s    [N_PAR];
  int checks = 0, failures = 0;

  signed_conv dut (.code(code), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin
      for (int i = 0; i < N_PAR; i++) code[i] = ADC_W'((r + 3*i) % 32);
      #1;
      for (int i = 0; i < N_PAR; i++) begin
        int exp_s;
        exp_s = 2 * ((r + 3*i) % 32) - 31;
        checks++;
        if (int'(s[i]) != exp_s) begin
          failures++;
          $display("lane %0d code %0d: got %0d expected %0d", i, code[i], s[i], exp_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
