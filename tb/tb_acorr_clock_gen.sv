// tb_acorr_clock_gen -- self-checking test of the burst clock generator.
//
// Pulses start and counts the enable pulses that follow: there must be
// exactly 12, starting on the clock after start and back to back. A second
// start in the middle of a burst must not lengthen it.
module tb_acorr_clock_gen;
  import acorr_pkg::*;

  localparam int PULSES = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic en_o, busy_o;
  int   checks = 0, failures = 0;

  acorr_clock_gen #(.PULSES(PULSES)) dut (.clk, .rst_n, .start, .en_o, .busy_o);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic burst(int restart_at);
    int n, first, gap;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 0; first = -1; gap = 0;
    for (int t = 0; t < 40; t++) begin
      if (en_o) begin
        if (first < 0) first = t;
        else if (t != first + n) gap++;
        n++;
      end
      check("busy equals enable", int'(busy_o), int'(en_o));
      @(negedge clk);
      start = (t == restart_at);
      @(posedge clk); #1;
    end
    start = 1'b0;
    check("pulses per burst", n, PULSES);
    check("first pulse right after start", first, 0);
    check("pulses back to back", gap, 0);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check("idle after reset", int'(en_o), 0);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 check("idle without start", int'(en_o), 0);
    burst(-1);
    burst(5);   // restart attempt during the burst
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
