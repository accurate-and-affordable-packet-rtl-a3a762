// owd_calibration: removes the transceiver-chain latency from a one-way delay.
//
// The MAC, transceiver and PHY add a latency that grows linearly with the frame
// size. Fitting a line to loopback measurements and subtracting the ideal frame
// transmission time gives a calibration line offset + slope * size, which this
// block subtracts from each measured delay:
//   owd_cal = owd - offset - (slope * len) / 2^SLOPE_FRAC
// offset is in ns, slope in ns per byte with SLOPE_FRAC fraction bits; the
// product is rounded towards minus infinity by the arithmetic shift. With both
// coefficients 0 the delay passes unchanged. The linear form follows the
// document's calibration; the number formats are this design's choice.
// Purely combinational.
module owd_calibration #(
  parameter int unsigned SLOPE_FRAC = 16
) (
  input  logic signed [63:0] owd,
  input  logic [15:0]        len,
  input  logic signed [31:0] offset,
  input  logic signed [31:0] slope,
  output logic signed [63:0] owd_cal
);

  logic signed [48:0] prod;

  always_comb begin
    prod    = slope * $signed({1'b0, len});
    owd_cal = owd - 64'(offset) - 64'(prod >>> SLOPE_FRAC);
  end

endmodule
