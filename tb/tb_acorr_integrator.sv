// tb_acorr_integrator -- self-checking test of the integrating counter and
// its readout register.
//
// Adds random correlation values under a random enable, with runs long
// enough to wrap the 5-bit counter, then pulses trg and reads the five
// result bits with rd, expecting the sum modulo 32 MSB first. Checks that
// trg clears the counter, that a bit appears one clock after rd, and that
// the readout register keeps its value while a new integration runs.
module tb_acorr_integrator;
  import acorr_pkg::*;

  localparam int W = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0, trg = 1'b0, rd = 1'b0;
  sample_t      c = '0;
  logic         sum_o, sum_valid_o;
  logic [W-1:0] count_o;
  int           checks = 0, failures = 0;
  int           model, wraps = 0;

  acorr_integrator #(.W(W)) dut (.clk, .rst_n, .en, .c, .trg, .rd, .sum_o, .sum_valid_o, .count_o);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // read the W-bit result, MSB first, interleaving additions to show the
  // readout register is independent of the running counter
  task automatic read_out(int exp, bit add_meanwhile);
    int got;
    got = 0;
    for (int b = 0; b < W; b++) begin
      @(negedge clk);
      rd = 1'b1;
      en = add_meanwhile;
      c  = 2'b11;
      if (add_meanwhile) model += 3;
      @(posedge clk); #1;
      rd = 1'b0; en = 1'b0;
      check("sum_valid after rd", int'(sum_valid_o), 1);
      got = (got << 1) | int'(sum_o);
      check($sformatf("bit %0d (MSB first)", W-1-b), int'(sum_o), (exp >> (W-1-b)) & 1);
      @(posedge clk); #1;
      check("sum_valid only one clock", int'(sum_valid_o), 0);
    end
    check("serial value", got, exp);
  endtask

  task automatic trigger();
    @(negedge clk);
    trg = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    trg = 1'b0;
    check("counter cleared by trg", int'(count_o), 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      int n;
      model = 0;
      n = (run % 4 == 3) ? 25 : $urandom_range(1, 12);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        en = ($urandom_range(3) != 0);
        c  = sample_t'($urandom_range(3));
        @(posedge clk); #1;
        if (en) model += int'(c);
        check("running count", int'(count_o), model % 32);
      end
      if (model >= 32) wraps++;
      total = model % 32;
      trigger();
      model = 0;
      read_out(total, run % 2 == 1);
      check("count kept during readout", int'(count_o), model % 32);
      trigger();
      model = 0;
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
