// demux_4to16: gathers the outputs of the four interleaved 2.5GS/s ADCs
// into words of 16 consecutive samples for the 625MHz digital CDR.
//
// ADC j converts blind samples 4m+j, so each fast clock brings four
// consecutive samples. They are shifted into a 16-sample collection
// register, oldest at lane 0; when load is high (once every four fast
// clocks, from clk_div4) the completed group is copied on the next edge
// to the output word, which then holds for four fast clocks.
// Interface: adc[j] is ADC j's 5-bit code; word[i] is sample i of the word.
// Timing: word updates on the fast edge that ends a load cycle; samples of
// the fast cycle that has load high are the last four of that word.
// The 4:16 ratio and the clock rates follow the published design; the
// shift-and-hold structure and the sample order are this implementation's.
module demux_4to16
  import cdr_pkg::*;
(
  input  logic             clk_fast,
  input  logic             rst_n,
  input  logic             load,
  input  logic [ADC_W-1:0] adc  [N_ADC],
  output logic [ADC_W-1:0] word [N_PAR]
);

  logic [ADC_W-1:0] coll [N_PAR-N_ADC];   // first 12 samples of the group

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PAR-N_ADC; i++) coll[i] <= '0;
      for (int i = 0; i < N_PAR; i++)       word[i] <= '0;
    end else begin
      for (int i = 0; i < N_PAR-2*N_ADC; i++) coll[i] <= coll[i+N_ADC];
      for (int j = 0; j < N_ADC; j++) coll[N_PAR-2*N_ADC+j] <= adc[j];
      if (load) begin
        for (int i = 0; i < N_PAR-N_ADC; i++) word[i] <= coll[i];
        for (int j = 0; j < N_ADC; j++) word[N_PAR-N_ADC+j] <= adc[j];
      end
    end
  end


endmodule
