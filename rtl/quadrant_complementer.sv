// quadrant_complementer: folds the phase into the first quadrant.
//
// The sine over one quadrant is stored (here: approximated) only for 0..pi/2.
// In the second and fourth quadrants the phase inside the quadrant runs
// backwards over that curve, so the lower phase bits are one's-complemented
// whenever the second most significant phase bit is set. The one's complement
// maps the sample at quadrant offset q to offset (2**W-1-q), which is exactly
// mirror-symmetric about pi/2 when each phase code stands for the centre of
// its interval.
//
// Interface: purely combinational; msb2 is the second phase MSB, phase_in the
// W bits below it, phase_out the folded phase.
// The function follows the published synthesizer architecture (1's complementer driven
// by MSB2); nothing here is this design's own choice beyond the parameter.
module quadrant_complementer #(
  parameter int unsigned W = 10
) (
  input  logic         msb2,
  input  logic [W-1:0] phase_in,
  output logic [W-1:0] phase_out
);

  assign phase_out = phase_in ^ {W{msb2}};

endmodule
