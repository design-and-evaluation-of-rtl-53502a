// acorr_integrator -- binary counter integrating the 2-bit correlation,
// with a parallel-load readout shift register.
//
// The counter is a chain of CNT_W toggle stages (5 by default). The LSB of
// the correlation, c0, toggles the first stage; the MSB, c1, has weight two
// and joins the carry of the first stage into the second stage (the
// confluence buffer of the original). The counter therefore adds c1c0 on
// every enabled clock and wraps modulo 2**CNT_W. A pulse on trg (trg T1)
// copies the count into a CNT_W-stage readout register and clears the
// counter, as reading a toggle flip-flop destructively does. Each rd pulse
// (clk DFF) then shifts one bit out of the readout register, MSB first.
//
// Following the source design: c0 into the first stage, c1 merged with the
// first carry, five counter stages and five readout flip-flops, MSB-first
// serial readout. This design's own choices: the counter is written as an
// adder rather than a ripple of toggle cells; clearing on trg; trg wins over
// rd in the same cycle; a correlation arriving with trg starts the next
// integration.
//
// Interface: c is added on each clock with en high. sum_o/sum_valid_o are
// registered: the bit appears on the clock after rd. count_o shows the
// running count for monitoring.
module acorr_integrator
  import acorr_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  sample_t      c,
  input  logic         trg,
  input  logic         rd,
  output logic         sum_o,
  output logic         sum_valid_o,
  output logic [W-1:0] count_o
);

  logic [W-1:0] count_q;
  logic [W-1:0] rdsr_q;
  logic [W-1:0] addend;
  logic [W-1:0] base;

  always_comb begin
    addend = en ? W'(c) : '0;
    base   = trg ? '0 : count_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q     <= '0;
      rdsr_q      <= '0;
      sum_o       <= 1'b0;
      sum_valid_o <= 1'b0;
    end else begin
      count_q     <= base + addend;
      sum_valid_o <= rd & ~trg;
      if (trg) begin
        rdsr_q <= count_q;
        sum_o  <= 1'b0;
      end else if (rd) begin
        sum_o  <= rdsr_q[W-1];
        rdsr_q <= {rdsr_q[W-2:0], 1'b0};
      end
    end
  end

  assign count_o = count_q;

endmodule
