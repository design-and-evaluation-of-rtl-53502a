// tb_acorr_shift_register -- self-checking test of the zero-skew delay line.
//
// Feeds random samples with a random clock enable and keeps its own history
// of the samples shifted in (level 0 before the first). After every clock
// the reference output must be the newest sample and channel k's output the
// sample 1, 3, 5 or 7 enabled clocks older; the last stage is 7 clocks older
// still than the reference, i.e. 8 samples back.
module tb_acorr_shift_register;
  import acorr_pkg::*;

  localparam int NCH = 4;
  localparam int LAGS [NCH] = '{1, 3, 5, 7};

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    en = 1'b0;
  sample_t din = '0;
  sample_t ref_o, last_o;
  sample_t lag_o [NCH];
  sample_t hist [$];
  int      checks = 0, failures = 0;

  acorr_shift_register #(.NCH(NCH)) dut (.clk, .rst_n, .en, .din, .ref_o, .lag_o, .last_o);

  always #5 clk = ~clk;

  function automatic sample_t back(int n);
    // sample shifted in n enabled clocks before the newest one
    if (n >= hist.size()) return '0;
    return hist[hist.size() - 1 - n];
  endfunction

  task automatic check(string what, sample_t got, sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      din = sample_t'($urandom_range(3));
      en  = (i < 20) ? 1'b1 : ($urandom_range(2) != 0);
      @(posedge clk);
      if (en) hist.push_back(din);
      #1;
      check("reference", ref_o, back(0));
      for (int k = 0; k < NCH; k++)
        check($sformatf("lag %0d", LAGS[k]), lag_o[k], back(LAGS[k]));
      check("last stage", last_o, back(7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
