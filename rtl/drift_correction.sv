// drift_correction: integral controller that trims the timestamp counter rate.
//
// On each PPS event it takes the time the counter captured at that pulse,
// subtracts the time of the previous pulse and compares the difference with the
// nominal second: err = (t(k) - t(k-1)) - PPS_PERIOD_NS. The errors are summed,
// and the rate becomes NOMINAL - (sum << GAIN_SHIFT). A counter that runs fast
// thus slows until a GPS second again reads as PPS_PERIOD_NS nanoseconds.
// The document runs this "sum of the previous errors" law as software on the
// processor and writes the rate back; here it is logic, so the tester also
// works without a processor. Gain, widths and the lock flag are this design's
// choices. With a rate LSB of 2^-32 ns and 1e8 clocks per second, one LSB is
// 0.023 ns per second, and GAIN_SHIFT = 5 gives a loop gain of about 0.75.
//
// Timing: the first PPS after reset only stores the reference time. From the
// second on, rate, last_err and locked change one clock after pps_irq.
module drift_correction
  import ptt_pkg::*;
#(
  parameter logic [RATE_W-1:0] NOMINAL       = RATE_W'(64'd10 << RATE_FRAC),
  parameter int unsigned       PPS_PERIOD_NS = 1_000_000_000,
  parameter int unsigned       GAIN_SHIFT    = 5,
  parameter int unsigned       LOCK_TOL      = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pps_irq,
  input  logic [TS_W-1:0]     pps_ts,
  output logic [RATE_W-1:0]   rate,
  output logic signed [31:0]  last_err,
  output logic                locked
);

  localparam int unsigned SUM_W = 48;

  logic                    have_ref;
  logic [TS_W-1:0]         ref_ts;
  logic signed [SUM_W-1:0] err_sum;
  logic signed [SUM_W-1:0] sum_next;
  logic signed [31:0]      err;
  logic signed [RATE_W+1:0] rate_calc;

  always_comb begin
    err       = 32'($signed(pps_ts - ref_ts) - $signed(64'(PPS_PERIOD_NS)));
    sum_next  = err_sum + SUM_W'(err);
    rate_calc = $signed({2'b00, NOMINAL}) - (RATE_W+2)'(sum_next <<< GAIN_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_ref <= 1'b0;
      ref_ts   <= '0;
      err_sum  <= '0;
      rate     <= NOMINAL;
      last_err <= '0;
      locked   <= 1'b0;
    end else if (pps_irq) begin
      ref_ts   <= pps_ts;
      have_ref <= 1'b1;
      if (have_ref) begin
        err_sum  <= sum_next;
        last_err <= err;
        locked   <= (err <= $signed(LOCK_TOL)) && (err >= -$signed(LOCK_TOL));
        // keep the rate positive and inside its field
        if (rate_calc < 0)                                   rate <= '0;
        else if (rate_calc > $signed({2'b00, {RATE_W{1'b1}}})) rate <= '1;
        else                                                 rate <= rate_calc[RATE_W-1:0];
      end
    end
  end

endmodule
