// tb_acorr_in_sr -- self-checking test of the input test shift register.
//
// Loads 10 random samples at low speed (with idle clocks between loads),
// then shifts 12 times at high speed: dout must give the samples in load
// order, then level 0.
module tb_acorr_in_sr;
  import acorr_pkg::*;

  localparam int DEPTH = 10;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    load = 1'b0, shift = 1'b0;
  sample_t din = '0, dout;
  sample_t data [DEPTH];
  int      checks = 0, failures = 0;

  acorr_in_sr #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .load, .din, .shift, .dout);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < DEPTH; i++) begin
        data[i] = sample_t'($urandom_range(3));
        if (rep == 0) data[i] = sample_t'(3 - (i % 4));
        @(negedge clk);
        load = 1'b1; din = data[i];
        @(posedge clk); #1;
        load = 1'b0;
        repeat ($urandom_range(3)) @(posedge clk);
      end
      #1 check("first sample at the end after loading", int'(dout), int'(data[0]));
      for (int i = 0; i < DEPTH + 2; i++) begin
        check($sformatf("shift %0d", i), int'(dout), (i < DEPTH) ? int'(data[i]) : 0);
        @(negedge clk);
        shift = 1'b1;
        @(posedge clk); #1;
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
