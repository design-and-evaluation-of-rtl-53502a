// acorr_system -- 4-channel 2-bit-input autocorrelator with its test circuits.
//
// The autocorrelator estimates C(tau) = sum_t V(t) V(t+tau) of a 2-bit A/D
// sample stream for NCH lags (1, 3, 5 and 7 clocks by default). The stream
// enters a zero-skew delay line (acorr_shift_register); per channel a
// correlator (acorr_correlator) compares the reference sample with the
// delayed one, and a binary counter (acorr_integrator) sums the 2-bit
// correlation. A trg_t1 pulse moves all counts into the readout registers at
// once, and each clk_dff pulse shifts one bit of every channel out, MSB
// first, on sum_o[k].
//
// Two sample sources, chosen by use_adc:
//  * use_adc = 1: the A/D converter drives adc_data, one sample per clock
//    with adc_valid high; adc_valid is then the system clock enable.
//  * use_adc = 0 (on-chip high-speed test): samples are first loaded at low
//    speed into the input test register (insr_load/insr_din). A cg_start
//    pulse then starts the clock generator, whose burst of CG_PULSES clocks
//    moves the samples through the input register, the delay line, the
//    correlators and the counters. During the burst the output test register
//    records the sample leaving the delay line; outsr_read shifts it out on
//    outsr_dout afterwards.
//
// Following the source design: the channel structure, the lags, the 2-bit
// correlator, the 5-bit counters with MSB-first readout, and the presence of
// the clock generator and the input and output test registers. This design's
// own choices: the single clock with enables standing in for SFQ clock
// pulses, the source selection, what the output register monitors, and the
// asynchronous reset.
//
// Timing (enabled clocks k = 0, 1, ...; s[k] the sample entering the delay
// line on clock k, 0 before the first): on clock k channel j's counter adds
// 3 - |s[k-2] - s[k-2-lag_j]| for k >= 1, and 0 on clock 0 after reset (the
// correlator's reset value). Before reset the delay line holds level 0, so
// the first clocks after reset compare real samples with level-0 history.
module acorr_system
  import acorr_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned W     = CNT_W,
  parameter int unsigned DEPTH = TEST_DEPTH,
  parameter int unsigned BURST = CG_PULSES
) (
  input  logic         clk,
  input  logic         rst_n,
  // sample source
  input  logic         use_adc,
  input  logic         adc_valid,
  input  sample_t      adc_data,
  // input test register and clock generator
  input  logic         insr_load,
  input  sample_t      insr_din,
  input  logic         cg_start,
  output logic         cg_busy,
  // integration readout
  input  logic         trg_t1,
  input  logic         clk_dff,
  output logic [NCH-1:0] sum_o,
  output logic [NCH-1:0] sum_valid_o,
  output logic [W-1:0] count_o [NCH],
  // output monitoring register
  input  logic         outsr_read,
  output sample_t      outsr_dout
);

  logic    burst_en;
  logic    core_en;
  sample_t insr_dout;
  sample_t line_din;
  sample_t ref_s;
  sample_t lag_s [NCH];
  sample_t last_s;
  sample_t corr_s [NCH];

  acorr_clock_gen #(.PULSES(BURST)) u_cg (
    .clk, .rst_n, .start(cg_start), .en_o(burst_en), .busy_o(cg_busy)
  );

  acorr_in_sr #(.DEPTH(DEPTH)) u_in_sr (
    .clk, .rst_n, .load(insr_load), .din(insr_din),
    .shift(burst_en & ~use_adc), .dout(insr_dout)
  );

  always_comb begin
    core_en  = use_adc ? adc_valid : burst_en;
    line_din = use_adc ? adc_data  : insr_dout;
  end

  acorr_shift_register #(.NCH(NCH)) u_sr (
    .clk, .rst_n, .en(core_en), .din(line_din),
    .ref_o(ref_s), .lag_o(lag_s), .last_o(last_s)
  );

  for (genvar k = 0; k < NCH; k++) begin : g_ch
    acorr_correlator u_corr (
      .clk, .rst_n, .en(core_en), .x(ref_s), .y(lag_s[k]), .c(corr_s[k])
    );
    acorr_integrator #(.W(W)) u_int (
      .clk, .rst_n, .en(core_en), .c(corr_s[k]), .trg(trg_t1), .rd(clk_dff),
      .sum_o(sum_o[k]), .sum_valid_o(sum_valid_o[k]), .count_o(count_o[k])
    );
  end


  acorr_out_sr #(.DEPTH(DEPTH)) u_out_sr (
    .clk, .rst_n, .capture(core_en), .din(last_s), .read(outsr_read),
    .dout(outsr_dout)
  );

endmodule
