// tb_acorr_correlator -- self-checking test of the 2-bit correlator.
//
// Applies all 16 input pairs and then random pairs with a random clock
// enable. The expected output is the correlation level 3 - |x - y|, worked
// out arithmetically. Also checks the reset value, the one-clock latency
// and that the output holds while the enable is low.
module tb_acorr_correlator;
  import acorr_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    en = 1'b0;
  sample_t x = '0, y = '0, c;
  int      checks = 0, failures = 0;

  acorr_correlator dut (.clk, .rst_n, .en, .x, .y, .c);

  always #5 clk = ~clk;

  function automatic sample_t expect_c(sample_t a, sample_t b);
    int d;
    d = int'(a) - int'(b);
    if (d < 0) d = -d;
    return sample_t'(3 - d);
  endfunction

  task automatic check(string what, sample_t got, sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t held;
    repeat (2) @(posedge clk);
    #1 check("reset value", c, 2'b00);
    rst_n = 1'b1;
    // exhaustive truth table, one pair per enabled clock
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        x = sample_t'(a); y = sample_t'(b); en = 1'b1;
        @(posedge clk); #1;
        check($sformatf("table x=%0d y=%0d", a, b), c, expect_c(sample_t'(a), sample_t'(b)));
      end
    end
    // random pairs with a random enable
    held = c;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      x  = sample_t'($urandom_range(3));
      y  = sample_t'($urandom_range(3));
      en = ($urandom_range(3) != 0);
      #1 check("latency: output before clock", c, held);
      @(posedge clk); #1;
      if (en) held = expect_c(x, y);
      check("random", c, held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
