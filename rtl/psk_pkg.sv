// psk_pkg: widths, types and constants shared by the frequency synthesizer
// (DFS) and the PSK modems.
//
// The synthesizer widths follow the architecture this design is built on: a
// 16-bit phase increment and 16-bit phase offset, a phase word truncated to
// 12 bits (2 quadrant bits, 3 segment bits, 7 sub-angle bits), 13-bit segment
// terms, a 15-bit sum and a 15-bit output sample. The segment start values
// (SEG_Y) and slopes (SEG_SHIFT_A/B) are this design's own: the architecture
// names the eight start values y0..y7 and the shifts >>1, >>2, >>3 but does
// not give which slope each segment uses.
//
// Piecewise-linear quarter sine: the 10-bit phase inside a quadrant is split
// into segment s = p[9:7] and sub-angle x = p[6:0]. With X = x << 3,
//     amp = SEG_Y[s] + (X >> SEG_SHIFT_A[s]) + (X >> SEG_SHIFT_B[s])
// where a shift code of SHIFT_ZERO selects the constant 0 instead.
// The slopes are the sums of two powers of two nearest to the chord slope of
// each segment. SEG_Y[s] centres the error inside segment s: with
// e(p) = 7800*sin((p+0.5)*pi/2048) - slope term, SEG_Y[s] = round((max e +
// min e)/2) over the segment (0 for segment 0). The peak is about 7800 and
// the worst-case error 40, about 0.5 % of full scale.
package psk_pkg;

  localparam int unsigned PHASE_W = 16;  // phase increment / accumulator width
  localparam int unsigned TRUNC_W = 12;  // phase bits used by the converter
  localparam int unsigned QPH_W   = TRUNC_W - 2;  // phase bits inside a quadrant
  localparam int unsigned SEG_W   = 3;   // segment-select bits
  localparam int unsigned SUB_W   = QPH_W - SEG_W;  // sub-angle bits (7)
  localparam int unsigned TERM_W  = 13;  // width of each mux output
  localparam int unsigned SUM_W   = 15;  // width of the adder output
  localparam int unsigned AMP_W   = 15;  // signed output sample width

  // Nominal peak amplitude of the generated sine (value at 90 degrees).
  localparam int unsigned AMP_PEAK = 7800;

  // Phase offsets (omega input of the DFS) for common carrier phases.
  localparam logic [PHASE_W-1:0] PH_0   = 16'h0000;
  localparam logic [PHASE_W-1:0] PH_45  = 16'h2000;
  localparam logic [PHASE_W-1:0] PH_90  = 16'h4000;
  localparam logic [PHASE_W-1:0] PH_M45 = 16'hE000;

  typedef logic signed [AMP_W-1:0] sample_t;

  // Shift codes for the two slope multiplexers: 0..3 = shift by that amount,
  // SHIFT_ZERO = constant 0.
  localparam logic [2:0] SHIFT_ZERO = 3'd7;

  localparam logic [TERM_W-1:0] SEG_Y [8] = '{
    13'd0, 13'd1491, 13'd3025, 13'd4359, 13'd5497, 13'd6472, 13'd7180, 13'd7676
  };
  // Upper multiplexer: X or X>>1 or 0.  Lower multiplexer: X>>1..X>>3 or 0.
  // Slopes per segment: 1.5, 1.5, 1.25, 1.125, 1.0, 0.75, 0.5, 0.125.
  localparam logic [2:0] SEG_SHIFT_A [8] = '{
    3'd0, 3'd0, 3'd0, 3'd0, 3'd0, 3'd1, 3'd1, SHIFT_ZERO
  };
  localparam logic [2:0] SEG_SHIFT_B [8] = '{
    3'd1, 3'd1, 3'd2, 3'd3, SHIFT_ZERO, 3'd2, SHIFT_ZERO, 3'd3
  };

  // Width of the per-symbol correlation accumulators in the demodulators.
  localparam int unsigned CORR_W = 30;

  // Three-valued sign used by the multiplier-less correlators.
  typedef enum logic [1:0] {SGN_ZERO = 2'b00, SGN_POS = 2'b01, SGN_NEG = 2'b11} sgn_e;

  function automatic sgn_e sign_of(input sample_t v);
    if (v > 0)      return SGN_POS;
    else if (v < 0) return SGN_NEG;
    else            return SGN_ZERO;
  endfunction

endpackage
