// udiv64: sequential unsigned divider, 64-bit by 64-bit.
//
// Restoring division, one quotient bit per clock: a start pulse loads the
// operands and 64 clocks later done pulses with quotient and remainder valid
// (they stay valid until the next start). Division by zero gives an all-ones
// quotient. Used by the network parameters calculator for throughput and
// the mean delay and jitter. The divider, a plain area-saving choice, is this
// design's own.
module udiv64 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] dividend,
  input  logic [63:0] divisor,
  output logic        busy,
  output logic        done,
  output logic [63:0] quotient,
  output logic [63:0] remainder
);

  logic [63:0] dvs_q;
  logic [6:0]  cnt_q;
  logic [64:0] trial;

  always_comb trial = {remainder, quotient[63]} - {1'b0, dvs_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      dvs_q     <= '0;
      cnt_q     <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        dvs_q     <= divisor;
        quotient  <= dividend;
        remainder <= '0;
        cnt_q     <= 7'd64;
      end else if (busy) begin
        if (!trial[64]) begin
          remainder <= trial[63:0];
          quotient  <= {quotient[62:0], 1'b1};
        end else begin
          remainder <= {remainder[62:0], quotient[63]};
          quotient  <= {quotient[62:0], 1'b0};
        end
        cnt_q <= cnt_q - 1;
        if (cnt_q == 7'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
