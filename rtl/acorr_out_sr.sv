// acorr_out_sr -- output monitoring shift register.
//
// DEPTH stages (10 by default) of 2-bit samples. While capture is high (the
// high-speed clock) it records din once per cycle, keeping the last DEPTH
// values. Afterwards each low-speed read pulse shifts it one stage, filling
// with level 0, and dout shows the oldest kept value first.
//
// The source design names a 10-bit output shift register for data
// monitoring. What is monitored is this design's own choice (the system top
// feeds it the sample leaving the delay line), as are the 2-bit stages and
// capture priority.
//
// Interface: capture records din; read shifts; capture wins if both are
// high. dout is the last stage, a register output.
module acorr_out_sr
  import acorr_pkg::*;
#(
  parameter int unsigned DEPTH = TEST_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    capture,
  input  sample_t din,
  input  logic    read,
  output sample_t dout
);

  sample_t sr_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr_q[i] <= '0;
    end else if (capture || read) begin
      sr_q[0] <= capture ? din : '0;
      for (int i = 1; i < DEPTH; i++) sr_q[i] <= sr_q[i-1];
    end
  end

  assign dout = sr_q[DEPTH-1];

endmodule
