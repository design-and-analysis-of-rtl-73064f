// dfs: digital frequency synthesizer producing one sinusoidal carrier.
//
// Phase accumulator -> quadrant complementer -> piecewise-linear quarter sine
// -> format converter -> output register. The 12-bit truncated phase is split
// into MSB1 (sign: pi..2pi), MSB2 (second/fourth quadrant: fold the phase by
// one's complement), 3 segment bits and 7 sub-angle bits. The output is
//     sample ~= AMP_PEAK * sin(2*pi*(phase + omega) / 2**16)
// with about 1 % worst-case error. Several instances with the same delta_p and
// reset stay phase-locked, so different omega values give cosine or any other
// fixed phase of the same carrier.
//
// Interface: delta_p (phase increment), omega (phase offset, 2**16 = 2*pi).
// sample is registered; sample_wrap is high with the first sample of each
// carrier period (derived from the accumulator without omega), and
// sample_phase is the 12-bit phase the sample was computed from.
// Timing: the sample for phase-register value P appears one clock after P.
// All stages follow the published synthesizer architecture; the output register (one
// pipeline stage, which an FPGA logic cell provides anyway), the wrap output
// and the reset are this design's own.
module dfs
  import psk_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PHASE_W-1:0]   delta_p,
  input  logic [PHASE_W-1:0]   omega,
  output sample_t              sample,
  output logic                 sample_wrap,
  output logic [TRUNC_W-1:0]   sample_phase
);

  logic [TRUNC_W-1:0] phase;
  logic               wrap;
  logic [QPH_W-1:0]   folded;
  logic [SUM_W-1:0]   mag;
  sample_t            signed_amp;

  phase_accumulator u_acc (
    .clk, .rst_n, .delta_p, .omega,
    .phase_out (phase),
    .wrap      (wrap)
  );

  quadrant_complementer #(.W(QPH_W)) u_comp (
    .msb2      (phase[TRUNC_W-2]),
    .phase_in  (phase[QPH_W-1:0]),
    .phase_out (folded)
  );

  pwl_sine_converter u_pwl (
    .phase_in (folded),
    .amp_out  (mag)
  );

  format_converter #(.W(AMP_W)) u_fmt (
    .msb1       (phase[TRUNC_W-1]),
    .mag_in     (AMP_W'(mag)),
    .sample_out (signed_amp)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample       <= '0;
      sample_wrap  <= 1'b0;
      sample_phase <= '0;
    end else begin
      sample       <= signed_amp;
      sample_wrap  <= wrap;
      sample_phase <= phase;
    end
  end

endmodule
