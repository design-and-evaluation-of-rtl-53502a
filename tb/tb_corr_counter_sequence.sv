// tb_corr_counter_sequence -- the correlator/counter test sequence.
//
// A correlator feeds a 5-bit integrating counter, as in the stand-alone
// test circuit of the two. Ten pairs of 2-bit inputs are applied, chosen so
// that the correlations are 11, 10, 01, 00, 11, 10, 01, 11, 10, 11; their
// sum is 20 = 10100. After the pairs the counter is triggered and read,
// MSB first, and must give 1, 0, 1, 0, 0. The run takes 11 enabled clocks
// (one more than the pairs, for the correlator stage); that count is
// checked as well. A second pass uses random pairs.
module tb_corr_counter_sequence;
  import acorr_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0, trg = 1'b0, rd = 1'b0;
  sample_t      x = '0, y = '0, c;
  logic         sum_o, sum_valid_o;
  logic [4:0]   count_o;
  int           checks = 0, failures = 0;

  acorr_correlator u_corr (.clk, .rst_n, .en, .x, .y, .c);
  acorr_integrator #(.W(5)) u_cnt (.clk, .rst_n, .en, .c, .trg, .rd, .sum_o, .sum_valid_o, .count_o);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // apply pairs, one per enabled clock, plus one flush clock; return the
  // number of enabled clocks until the count reached its final value
  task automatic run(sample_t xs [10], sample_t ys [10], int exp);
    int clocks;
    clocks = 0;
    for (int i = 0; i <= 10; i++) begin
      @(negedge clk);
      en = 1'b1;
      x  = (i < 10) ? xs[i] : '0;
      y  = (i < 10) ? ys[i] : '0;
      @(posedge clk); #1;
      clocks++;
      en = 1'b0;
    end
    check("enabled clocks for 10 pairs", clocks, 11);
    check("count", int'(count_o), exp % 32);
    @(negedge clk) trg = 1'b1;
    @(negedge clk) trg = 1'b0;
    for (int b = 4; b >= 0; b--) begin
      rd = 1'b1;
      @(negedge clk) rd = 1'b0;
      check("readout strobe", int'(sum_valid_o), 1);
      check($sformatf("sum bit %0d", b), int'(sum_o), ((exp % 32) >> b) & 1);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // pairs giving 11,10,01,00,11,10,01,11,10,11
    sample_t xs [10] = '{2'd1, 2'd0, 2'd0, 2'd3, 2'd2, 2'd3, 2'd3, 2'd0, 2'd2, 2'd3};
    sample_t ys [10] = '{2'd1, 2'd1, 2'd2, 2'd0, 2'd2, 2'd2, 2'd1, 2'd0, 2'd1, 2'd3};
    int exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(xs, ys, 20);
    for (int rep = 0; rep < 20; rep++) begin
      // clear the (0,0) correlation left in the correlator by the flush
      // clock, then the counter
      @(negedge clk) en = 1'b1; x = '0; y = 2'd3;
      @(negedge clk) en = 1'b0; trg = 1'b1;
      @(negedge clk) trg = 1'b0;
      exp = 0;
      for (int i = 0; i < 10; i++) begin
        int d;
        xs[i] = sample_t'($urandom_range(3));
        ys[i] = sample_t'($urandom_range(3));
        d = int'(xs[i]) - int'(ys[i]);
        exp += 3 - ((d < 0) ? -d : d);
      end
      // the flush clock adds the result of the last real pair only; the
      // pair applied on it (0, 0) is not added
      run(xs, ys, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
