// tb_timestamp_counter: self-checking test of the variable-rate time counter.
//
// Checks that the time advances by exactly the integer part of the rate every
// clock (10 ns at the nominal rate), that a fractional rate accumulates
// correctly over many clocks (6.4 ns per clock for 1000 clocks is 6400 ns),
// and that a PPS edge raises pps_irq for one clock, three clocks after the
// input, with pps_ts equal to the time of that clock.
module tb_timestamp_counter;
  import ptt_pkg::*;

  logic clk = 0, rst_n = 0, pps_in = 0;
  logic [RATE_W-1:0] rate;
  logic [TS_W-1:0] timestamp, pps_ts, t0;
  logic pps_irq;
  int checks = 0, failures = 0, irqs = 0;

  always #5 clk = ~clk;

  timestamp_counter dut (.clk, .rst_n, .rate, .pps_in, .timestamp, .pps_irq, .pps_ts);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && pps_irq) irqs++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rate = RATE_W'(64'd10 << RATE_FRAC);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(timestamp == 10, "time is 10 one clock after reset release");
    t0 = timestamp;
    repeat (7) @(posedge clk);
    #1 check(timestamp == t0 + 70, $sformatf("7 clocks at 10 ns: %0d", timestamp - t0));

    // 6.4 ns per clock: 0.4 = 1717986918.4 / 2^32; use the floor
    rate = RATE_W'((64'd6 << RATE_FRAC) + 64'd1717986918);
    @(posedge clk); #1 t0 = timestamp;
    repeat (1000) @(posedge clk);
    #1 check((timestamp - t0) inside {[6399:6400]}, $sformatf("1000 clocks at 6.4 ns: %0d", timestamp - t0));

    // PPS: rising edge -> irq three clocks later, time captured then
    rate = RATE_W'(64'd10 << RATE_FRAC);
    @(negedge clk) pps_in = 1;
    @(posedge clk); #1 check(!pps_irq, "no irq after 1 clock");
    @(posedge clk); #1 check(!pps_irq, "no irq after 2 clocks");
    @(posedge clk); #1 check(pps_irq, "irq after 3 clocks");
    check(pps_ts == timestamp - 10, $sformatf("pps_ts %0d vs time %0d", pps_ts, timestamp));
    @(posedge clk); #1 check(!pps_irq, "irq lasts one clock");
    repeat (20) @(posedge clk);
    pps_in = 0;
    repeat (10) @(posedge clk);
    #1 check(irqs == 1, $sformatf("one irq per pulse, got %0d", irqs));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
