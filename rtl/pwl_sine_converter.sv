// pwl_sine_converter: multiplier-less, ROM-less quarter-wave sine.
//
// Replaces the quarter-sine look-up table by a piecewise-linear curve of eight
// segments. The folded 10-bit quadrant phase is split into a 3-bit segment
// number s and a 7-bit sub-angle x. Three multiplexers, all selected by s,
// pick three integers that a single adder sums:
//   upper mux  : the sub-angle X (= x << 3), X >> 1 or 0
//   middle mux : X >> 1, X >> 2, X >> 3 or 0
//   lower mux  : the start value y_s of the segment
// The first two together give a slope of the form 2^-a + 2^-b times X, so no
// multiplier is needed. The sub-angle is placed three bits up inside the
// 13-bit terms so that the >> 3 path loses no bits.
//
// Interface: purely combinational. phase_in is the folded quadrant phase;
// amp_out the unsigned magnitude (0 .. about 7800) on SUM_W bits.
// The mux/shift/adder structure, segment and sub-angle split and the 13/15-bit
// widths follow the published synthesizer architecture. The start values, the slope of
// each segment and the << 3 placement are this design's own (see psk_pkg).
module pwl_sine_converter
  import psk_pkg::*;
(
  input  logic [QPH_W-1:0] phase_in,
  output logic [SUM_W-1:0] amp_out
);

  logic [SEG_W-1:0]  seg;
  logic [TERM_W-1:0] sub_x;
  logic [TERM_W-1:0] term_a, term_b, term_y;

  assign seg   = phase_in[QPH_W-1 -: SEG_W];
  assign sub_x = TERM_W'({phase_in[SUB_W-1:0], 3'b000});

  function automatic logic [TERM_W-1:0] shifted(input logic [TERM_W-1:0] v,
                                                input logic [2:0] code);
    case (code)
      3'd0:    return v;
      3'd1:    return v >> 1;
      3'd2:    return v >> 2;
      3'd3:    return v >> 3;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    term_a = shifted(sub_x, SEG_SHIFT_A[seg]);
    term_b = shifted(sub_x, SEG_SHIFT_B[seg]);
    term_y = SEG_Y[seg];
  end

  assign amp_out = SUM_W'(term_a) + SUM_W'(term_b) + SUM_W'(term_y);

endmodule
