// timestamp_counter: variable-rate time counter disciplined by a GPS PPS.
//
// Every clock the counter adds `rate` nanoseconds, an 8.32 fixed-point number,
// to a 96-bit accumulator; the integer part is the timestamp in ns. With the
// nominal rate of 10.0 at 100 MHz the timestamp steps by 10 ns, the resolution
// the document gives for its 1 Gb/s prototype; 6.4 at 156.25 MHz gives the
// 6.4 ns of its 10 Gb/s prototype. Trimming the fraction of `rate` corrects the
// drift of the local oscillator (see drift_correction).
//
// The asynchronous pps_in goes through a two-flop synchronizer. On its rising
// edge the time is captured in pps_ts and pps_irq pulses for one clock, which
// is the interruption the document sends to the processor.
//
// Timing: timestamp is a register, updated every clock; pps_irq rises three
// clocks after pps_in (two synchronizer stages and the edge register), and
// pps_ts holds the time of that same clock edge.
// The variable-rate counter and the PPS interrupt follow the document; the
// number formats and the synchronizer are this design's choices.
module timestamp_counter
  import ptt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [RATE_W-1:0]   rate,      // ns per clock, 8.32
  input  logic                pps_in,    // asynchronous
  output logic [TS_W-1:0]     timestamp, // ns
  output logic                pps_irq,
  output logic [TS_W-1:0]     pps_ts
);

  logic [RATE_FRAC-1:0] frac_q;
  logic [2:0]           pps_sync;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timestamp <= '0;
      frac_q    <= '0;
      pps_sync  <= '0;
      pps_irq   <= 1'b0;
      pps_ts    <= '0;
    end else begin
      {timestamp, frac_q} <= {timestamp, frac_q} + (TS_W + RATE_FRAC)'(rate);
      pps_sync <= {pps_sync[1:0], pps_in};
      pps_irq  <= pps_sync[1] & ~pps_sync[2];
      if (pps_sync[1] & ~pps_sync[2]) pps_ts <= timestamp;
    end
  end

endmodule
