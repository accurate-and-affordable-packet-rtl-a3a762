// tb_drift_correction: closed-loop test of the PPS drift correction.
//
// A timestamp_counter and drift_correction pair run with a shortened PPS
// period: the nominal second is PPS_NS = 100000 ns (10000 clocks of 10 ns),
// but the test's PPS arrives every 10030 clocks, i.e. the local oscillator is
// 3000 ppm fast against GPS. Before correction each "second" reads 100300 ns
// (error +300). The loop must bring the error to within +/-2 ns and report
// lock within 12 periods, and the rate must settle near 10 * 10000/10030 ns.
// GAIN_SHIFT is 18 here because one period is 10000 clocks instead of 1e8:
// one rate LSB then moves a period by 10000 * 2^-32 ns.
module tb_drift_correction;
  import ptt_pkg::*;

  localparam int unsigned PPS_NS = 100_000;
  localparam int unsigned PERIOD_CLK = 10_030;

  logic clk = 0, rst_n = 0, pps_in = 0;
  logic [RATE_W-1:0] rate;
  logic [TS_W-1:0] timestamp, pps_ts;
  logic pps_irq, locked;
  logic signed [31:0] last_err;
  int checks = 0, failures = 0, n_pps = 0, first_lock = -1;
  int errs[$];

  always #5 clk = ~clk;

  timestamp_counter u_ts (.clk, .rst_n, .rate, .pps_in, .timestamp, .pps_irq, .pps_ts);
  drift_correction #(.PPS_PERIOD_NS(PPS_NS), .GAIN_SHIFT(18), .LOCK_TOL(2)) dut (
    .clk, .rst_n, .pps_irq, .pps_ts, .rate, .last_err, .locked);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #(10 * PERIOD_CLK * 30);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PPS generator: 10 clocks high every PERIOD_CLK clocks
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (PERIOD_CLK - 10) @(posedge clk);
      pps_in <= 1;
      repeat (10) @(posedge clk);
      pps_in <= 0;
    end
  end

  always @(posedge clk) if (pps_irq) begin
    n_pps++;
  end

  initial begin
    real r;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    check(rate == RATE_W'(64'd10 << RATE_FRAC), "nominal rate after reset");
    for (int k = 0; k < 20; k++) begin
      @(posedge clk iff pps_irq);
      @(posedge clk); #1;
      errs.push_back(last_err);
      if (locked && first_lock < 0) first_lock = k;
    end
    // k = 0 is the reference pulse; k = 1 sees the full uncorrected error
    check(errs[1] inside {[299:301]}, $sformatf("first error %0d, expected 300", errs[1]));
    check(errs[19] >= -2 && errs[19] <= 2, $sformatf("final error %0d", errs[19]));
    check(first_lock > 0 && first_lock <= 12, $sformatf("locked at period %0d", first_lock));
    check(locked, "locked at the end");
    r = real'(rate) / (2.0 ** 32);
    check(r > 9.9699 && r < 9.9702, $sformatf("rate %f, expected %f", r, 10.0 * 10000 / 10030));
    $display("errors per period: %p", errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
