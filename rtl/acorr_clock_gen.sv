// acorr_clock_gen -- on-chip burst clock generator for the high-speed test.
//
// A start pulse (the "cg" trigger) makes the generator emit exactly PULSES
// high-speed clock pulses, one per cycle, and then stop. Here a clock pulse
// is a clock enable, en_o, for the rest of the system, which is clocked by a
// single clock; a start during a burst is ignored.
//
// The source design names a 12-bit clock generator triggered by "cg" but does
// not describe its insides. Reading "12-bit" as a burst of 12 pulses, and
// the down-counter that counts them, are this design's own choices: 12 pulses
// move 10 test samples through the input register, the delay line and the
// one-stage correlator.
//
// Interface: en_o goes high the cycle after start and stays high for PULSES
// cycles. busy_o is high while a burst is running.
module acorr_clock_gen
  import acorr_pkg::*;
#(
  parameter int unsigned PULSES = CG_PULSES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic en_o,
  output logic busy_o
);

  localparam int unsigned CW = $clog2(PULSES + 1);

  logic [CW-1:0] left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   left_q <= '0;
    else if (left_q != '0)        left_q <= left_q - 1'b1;
    else if (start)               left_q <= CW'(PULSES);
  end

  assign en_o   = (left_q != '0);
  assign busy_o = en_o;

  // A burst is exactly PULSES clocks long. (Its disable on rst_n makes lint
  // see rst_n used synchronously too; this is simulation-only checking.)
  a_burst_length: assert property (
    @(posedge clk) disable iff (!rst_n) $rose(en_o) |-> en_o [*PULSES] ##1 !en_o
  );

endmodule
