// format_converter: turns the full-wave-rectified magnitude into a signed sine.
//
// Between pi and 2*pi (phase MSB set) the sine is negative: the magnitude is
// negated into two's complement; otherwise it passes unchanged. This is the
// "multiply by -1" step of the synthesizer, done with an inverter and an
// increment.
//
// Interface: purely combinational. msb1 is the phase MSB, mag_in the unsigned
// magnitude, sample_out the signed sample. mag_in must stay below 2**(W-1).
// The function and the 15-bit widths follow the published synthesizer architecture; the
// choice of two's complement as output format is this design's own.
module format_converter
  import psk_pkg::*;
#(
  parameter int unsigned W = AMP_W
) (
  input  logic                msb1,
  input  logic [W-1:0]        mag_in,
  output logic signed [W-1:0] sample_out
);

  assign sample_out = msb1 ? signed'(~mag_in + W'(1)) : signed'(mag_in);

endmodule
