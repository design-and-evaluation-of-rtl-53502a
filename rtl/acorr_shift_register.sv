// acorr_shift_register -- delay line that supplies V(t) and V(t+tau).
//
// A chain of 2*N_CH stages of 2-bit sample registers (2 bits x 8 stages =
// 16 flip-flops for the default 4 channels). Every stage is clocked by the
// same enable at once (zero-skew clocking), so a sample moves one stage per
// enabled clock. Counting stages from 0 at the input, the reference sample
// x is the output of stage 0 and channel k's delayed sample y the output of
// stage 2k+1, so the lag between x and y is 2k+1 clocks: 1, 3, 5 and 7
// clocks for the four channels.
//
// Following the source design: 16 flip-flops, zero-skew clocking, lags of
// 1, 3, 5 and 7 clocks. This design's own choices: which stages are tapped
// (the reference is delayed by one stage so that all 16 flip-flops are used),
// a clock enable standing for the presence of a clock pulse, and an
// asynchronous reset that empties the chain to level 0.
//
// Interface: din is shifted in on every clock with en high. ref_o and
// lag_o[k] are register outputs, valid the cycle after the clock that moved
// them. last_o is the sample leaving the chain (the lag-7 tap by default).
module acorr_shift_register
  import acorr_pkg::*;
#(
  parameter int unsigned NCH = N_CH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t din,
  output sample_t ref_o,
  output sample_t lag_o [NCH],
  output sample_t last_o
);

  // Stage i holds the sample of i+1 clocks ago; tapping stage i against
  // stage 0 gives a lag of i clocks.
  localparam int unsigned DEPTH = FIRST_LAG + LAG_STEP * (NCH - 1) + 1;

  sample_t stage_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage_q[i] <= '0;
    end else if (en) begin
      stage_q[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign ref_o  = stage_q[0];
  assign last_o = stage_q[DEPTH-1];

  for (genvar k = 0; k < NCH; k++) begin : g_tap
    assign lag_o[k] = stage_q[FIRST_LAG + LAG_STEP*k];
  end

endmodule
