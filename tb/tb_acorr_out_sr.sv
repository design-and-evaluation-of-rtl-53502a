// tb_acorr_out_sr -- self-checking test of the output monitoring register.
//
// Captures a random number (5 to 20) of random samples at high speed, then
// reads 12 times at low speed: dout must give the last 10 captured samples,
// oldest first (level 0 where fewer were captured), then level 0.
module tb_acorr_out_sr;
  import acorr_pkg::*;

  localparam int DEPTH = 10;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    capture = 1'b0, read = 1'b0;
  sample_t din = '0, dout;
  sample_t cap [$];
  int      checks = 0, failures = 0;

  acorr_out_sr #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .capture, .din, .read, .dout);

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
      int n;
      n = $urandom_range(5, 20);
      cap = {};
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        capture = 1'b1; din = sample_t'($urandom_range(3));
        cap.push_back(din);
        @(posedge clk); #1;
        capture = 1'b0;
      end
      // the read-out of the previous run has emptied the register, so
      // positions before the first capture read as level 0
      for (int i = 0; i < DEPTH + 2; i++) begin
        int idx, exp;
        idx = n - DEPTH + i;
        exp = (i < DEPTH && idx >= 0) ? int'(cap[idx]) : 0;
        check($sformatf("read %0d", i), int'(dout), exp);
        repeat ($urandom_range(2)) @(posedge clk);
        @(negedge clk);
        read = 1'b1;
        @(posedge clk); #1;
        read = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
