// tb_acorr_system -- end-to-end test of the 4-channel autocorrelator system
// at its default sizes.
//
// Alternates between the two sample sources:
//  * on-chip high-speed test: load 10 random samples into the input test
//    register at low speed, pulse cg_start, let the 12-clock burst run;
//  * A/D converter: stream random samples under a random valid, long enough
//    that some 5-bit counters wrap.
// After each operation it pulses trg_t1, reads the five result bits of all
// four channels with clk_dff (MSB first) and reads the output monitoring
// register. The expected values come from a reference model kept here: the
// list of samples that entered the delay line, from which channel k's sum is
// sum over enabled clocks g of 3 - |s[g-2] - s[g-2-lag_k]| (lags 1, 3, 5,
// 7; level 0 before the first sample; nothing on the very first clock, when
// the correlators still hold their reset value), modulo 32.
// Every mechanism (burst, A/D streaming, source switch, counter wrap,
// ignored restart of the clock generator, monitor readout) is counted and
// must occur at least once.
module tb_acorr_system;
  import acorr_pkg::*;

  localparam int NCH   = 4;
  localparam int W     = 5;
  localparam int DEPTH = 10;
  localparam int BURST = 12;
  localparam int LAGS [NCH] = '{1, 3, 5, 7};

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           use_adc = 1'b0, adc_valid = 1'b0;
  sample_t        adc_data = '0;
  logic           insr_load = 1'b0;
  sample_t        insr_din = '0;
  logic           cg_start = 1'b0, cg_busy;
  logic           trg_t1 = 1'b0, clk_dff = 1'b0;
  logic [NCH-1:0] sum_o, sum_valid_o;
  logic [W-1:0]   count_o [NCH];
  logic           outsr_read = 1'b0;
  sample_t        outsr_dout;

  acorr_system dut (
    .clk, .rst_n, .use_adc, .adc_valid, .adc_data, .insr_load, .insr_din,
    .cg_start, .cg_busy, .trg_t1, .clk_dff, .sum_o, .sum_valid_o, .count_o,
    .outsr_read, .outsr_dout
  );

  always #5 clk = ~clk;

  int      checks = 0, failures = 0;
  int      n_burst = 0, n_adc = 0, n_switch = 0, n_wrap = 0, n_restart = 0, n_monitor = 0;
  sample_t line [$];      // every sample that entered the delay line
  int      acc [NCH];     // model sums since the last trg_t1
  int      n_cap;         // monitor captures since the last monitor read
  sample_t cap [$];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int at(int i);
    return (i < 0 || i >= line.size()) ? 0 : int'(line[i]);
  endfunction

  function automatic int corr(int a, int b);
    return 3 - ((a > b) ? a - b : b - a);
  endfunction

  // one enabled clock of the model, with sample s entering the line
  function automatic void model_step(sample_t s);
    int g;
    g = line.size();
    // the first enabled clock adds the correlator's reset value, 0
    if (g > 0)
      for (int k = 0; k < NCH; k++) acc[k] += corr(at(g-2), at(g-2-LAGS[k]));
    cap.push_back(sample_t'(at(g-8)));
    n_cap++;
    line.push_back(s);
  endfunction

  task automatic run_burst(bit try_restart);
    sample_t d [DEPTH];
    if (use_adc) n_switch++;
    @(negedge clk) use_adc = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      d[i] = sample_t'($urandom_range(3));
      @(negedge clk);
      insr_load = 1'b1; insr_din = d[i];
      @(negedge clk);
      insr_load = 1'b0;
    end
    @(negedge clk) cg_start = 1'b1;
    @(negedge clk) cg_start = 1'b0;
    for (int i = 0; i < BURST; i++) begin
      check("clock generator running", int'(cg_busy), 1);
      if (try_restart && i == 4) cg_start = 1'b1;
      else cg_start = 1'b0;
      model_step((i < DEPTH) ? d[i] : sample_t'(0));
      @(negedge clk);
    end
    if (try_restart) n_restart++;
    cg_start = 1'b0;
    check("burst length", int'(cg_busy), 0);
    n_burst++;
  endtask

  task automatic run_adc(int n);
    if (!use_adc) n_switch++;
    @(negedge clk) use_adc = 1'b1;
    for (int i = 0; i < n; i++) begin
      adc_valid = ($urandom_range(4) != 0);
      adc_data  = sample_t'($urandom_range(3));
      if (adc_valid) model_step(adc_data);
      @(negedge clk);
    end
    adc_valid = 1'b0;
    n_adc++;
  endtask

  task automatic read_result();
    int got [NCH];
    for (int k = 0; k < NCH; k++) begin
      check($sformatf("ch%0d running count", k), int'(count_o[k]), acc[k] % 32);
      if (acc[k] >= 32) n_wrap++;
    end
    trg_t1 = 1'b1;
    @(negedge clk) trg_t1 = 1'b0;
    for (int k = 0; k < NCH; k++) got[k] = 0;
    for (int b = 0; b < W; b++) begin
      clk_dff = 1'b1;
      @(negedge clk) clk_dff = 1'b0;
      check("readout strobe", int'(sum_valid_o), (1 << NCH) - 1);
      for (int k = 0; k < NCH; k++) got[k] = (got[k] << 1) | int'(sum_o[k]);
      @(negedge clk);
    end
    for (int k = 0; k < NCH; k++) begin
      check($sformatf("ch%0d lag %0d integral", k, LAGS[k]), got[k], acc[k] % 32);
      check($sformatf("ch%0d cleared", k), int'(count_o[k]), 0);
      acc[k] = 0;
    end
  endtask

  task automatic read_monitor();
    for (int i = 0; i < DEPTH; i++) begin
      int idx;
      idx = cap.size() - DEPTH + i;
      check($sformatf("monitor %0d", i), int'(outsr_dout),
            (n_cap - DEPTH + i >= 0) ? int'(cap[idx]) : 0);
      outsr_read = 1'b1;
      @(negedge clk) outsr_read = 1'b0;
    end
    n_cap = 0;
    n_monitor++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NCH; k++) acc[k] = 0;
    n_cap = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int op = 0; op < 30; op++) begin
      case (op % 3)
        0: run_burst(op == 3);
        1: run_adc($urandom_range(5, 40));
        2: run_adc(60);
      endcase
      read_result();
      read_monitor();
    end
    check("bursts", int'(n_burst > 0), 1);
    check("A/D streams", int'(n_adc > 0), 1);
    check("source switches", int'(n_switch > 0), 1);
    check("counter wraps", int'(n_wrap > 0), 1);
    check("ignored clock-generator restarts", int'(n_restart > 0), 1);
    check("monitor reads", int'(n_monitor > 0), 1);
    $display("mechanisms: bursts=%0d adc=%0d switches=%0d wraps=%0d restarts=%0d monitor=%0d",
             n_burst, n_adc, n_switch, n_wrap, n_restart, n_monitor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
