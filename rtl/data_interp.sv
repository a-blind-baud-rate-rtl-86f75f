// data_interp: estimates the data samples at the wanted sampling phase
// from the blind (free-running) 2UI I&D samples by linear interpolation.
//
// The loop filter supplies one average interpolation phase phi per word,
// in 1/32 UI steps. Lane i of the word interpolates between the blind
// samples y[i-1] and y[i]:
//     x = (32 - phi) * y[i-1] + phi * y[i]
// The two blind samples before the word (y[-2], y[-1]) are kept from the
// previous word. When the phase wrapped since the last word:
//   WRAP_FWD (phase passed 1UI upward, data slower than the sampling
//     clock): lane 0 would repeat the previous word's last sample and is
//     dropped, giving 15 outputs;
//   WRAP_BWD (phase passed 0 downward, data faster than the sampling
//     clock): two wanted samples fall between y[-2] and y[-1], so one
//     extra sample is interpolated between them, giving 17 outputs.
// The outputs are packed from slot 0 (oldest) upward and x_cnt says how
// many slots are valid; slots at and above x_cnt are zero.
// Timing: x and x_cnt are registered, one cycle after y/phi/wrap.
// x is 32 times the 2UI sample scale (13 bits signed). The drop/add rule
// follows the description of the design; the lane pairing, the packing and
// the exact weights are this implementation's choices.
module data_interp
  import cdr_pkg::*;
#(
  parameter int unsigned LANES = N_PAR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [Y_W-1:0]   y   [LANES],
  input  logic        [PHI_W-1:0] phi,
  input  wrap_e                   wrap,
  output logic signed [X_W-1:0]   x   [LANES+1],
  output logic        [CNT_W-1:0] x_cnt
);

  localparam int unsigned ONE_UI = 1 << PHI_W;

  // Blind samples -2 .. LANES-1 of the word, index shifted by 2.
  logic signed [Y_W-1:0] y_hist [2];
  logic signed [Y_W-1:0] e      [LANES+2];
  logic signed [X_W-1:0] lane_x [LANES];
  logic signed [X_W-1:0] extra_x;
  logic signed [X_W-1:0] x_nxt  [LANES+1];
  logic        [CNT_W-1:0] cnt_nxt;

  function automatic logic signed [X_W-1:0] interp(
      input logic signed [Y_W-1:0] ya, input logic signed [Y_W-1:0] yb,
      input logic [PHI_W-1:0] p);
    logic signed [PHI_W+1:0] wa, wb;
    wa = $signed({1'b0, (PHI_W+1)'(ONE_UI) - (PHI_W+1)'(p)});
    wb = $signed({2'b00, p});
    return X_W'(ya * wa) + X_W'(yb * wb);
  endfunction

  always_comb begin
    e[0] = y_hist[0];
    e[1] = y_hist[1];
    for (int i = 0; i < LANES; i++) e[i+2] = y[i];
    for (int i = 0; i < LANES; i++) lane_x[i] = interp(e[i+1], e[i+2], phi);
    extra_x = interp(e[0], e[1], phi);

    for (int k = 0; k <= LANES; k++) x_nxt[k] = '0;
    unique case (wrap)
      WRAP_FWD: begin
        for (int k = 0; k < LANES-1; k++) x_nxt[k] = lane_x[k+1];
        cnt_nxt = CNT_W'(LANES - 1);
      end
      WRAP_BWD: begin
        x_nxt[0] = extra_x;
        for (int k = 0; k < LANES; k++) x_nxt[k+1] = lane_x[k];
        cnt_nxt = CNT_W'(LANES + 1);
      end
      default: begin
        for (int k = 0; k < LANES; k++) x_nxt[k] = lane_x[k];
        cnt_nxt = CNT_W'(LANES);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_hist[0] <= '0;
      y_hist[1] <= '0;
      x_cnt     <= '0;
      for (int k = 0; k <= LANES; k++) x[k] <= '0;
    end else begin
      // The loop filter only ever reports one of the three wrap cases.
      assert (wrap inside {WRAP_NONE, WRAP_FWD, WRAP_BWD});
      y_hist[0] <= y[LANES-2];
      y_hist[1] <= y[LANES-1];
      x_cnt     <= cnt_nxt;
      x         <= x_nxt;
    end
  end


endmodule
