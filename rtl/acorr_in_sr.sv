// acorr_in_sr -- input test shift register.
//
// DEPTH stages (10 by default) of 2-bit samples. Test data is loaded at low
// speed: each load pulse shifts din in at stage 0. On a high-speed clock
// (shift high) the register moves one stage towards its end and fills with
// level 0, so the samples leave dout in the order they were loaded. With no
// load the first sample loaded sits at the end once DEPTH samples are in.
//
// The source design names a 10-bit input shift register feeding test data to
// the autocorrelator; one 2-bit stage per sample, the zero fill and load
// priority below are this design's own choices.
//
// Interface: load shifts din in; shift (high-speed clock) shifts level 0 in;
// load wins if both are high. dout is the last stage, a register output.
module acorr_in_sr
  import acorr_pkg::*;
#(
  parameter int unsigned DEPTH = TEST_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  sample_t din,
  input  logic    shift,
  output sample_t dout
);

  sample_t sr_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr_q[i] <= '0;
    end else if (load || shift) begin
      sr_q[0] <= load ? din : '0;
      for (int i = 1; i < DEPTH; i++) sr_q[i] <= sr_q[i-1];
    end
  end

  assign dout = sr_q[DEPTH-1];

endmodule
