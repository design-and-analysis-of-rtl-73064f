// phase_accumulator: the phase accumulator of the frequency synthesizer.
//
// A frequency register holds the phase increment delta_p. On every clock the
// phase register adds the frequency register to itself, so the phase grows
// linearly and wraps once per carrier period; the carrier frequency is
// f_clk * delta_p / 2**PHASE_W. A phase offset omega is added after the
// register and the sum is truncated to its OUT_W most significant bits, the
// phase word used by the phase-to-amplitude converter.
//
// Interface: delta_p and omega are sampled continuously. phase_out is the
// truncated phase of the current phase register value. wrap is high for the
// one cycle whose phase register value starts a new carrier period (it is also
// high straight after reset, when the phase is 0); it ignores omega.
// Timing: a new delta_p is taken into the frequency register at the next edge
// and changes the phase step one cycle later. omega acts combinationally.
// Reset (active low, synchronous) clears the phase register; the frequency
// register keeps loading delta_p during reset, so the first period after
// reset is as long as every other.
//
// Frequency register, adder, phase register, the 16-bit widths and the 12-bit
// truncation follow the published synthesizer architecture; the placement of the offset
// adder after the register, the wrap flag and the reset are this design's own.
module phase_accumulator
  import psk_pkg::*;
#(
  parameter int unsigned ACC_W = PHASE_W,
  parameter int unsigned OUT_W = TRUNC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] delta_p,
  input  logic [ACC_W-1:0] omega,
  output logic [OUT_W-1:0] phase_out,
  output logic             wrap
);

  logic [ACC_W-1:0] freq_reg;
  logic [ACC_W-1:0] phase_reg;
  logic [ACC_W:0]   next_sum;
  logic [ACC_W-1:0] offset_phase;

  assign next_sum = {1'b0, phase_reg} + {1'b0, freq_reg};

  always_ff @(posedge clk) begin
    freq_reg <= delta_p;
    if (!rst_n) begin
      phase_reg <= '0;
      wrap      <= 1'b1;
    end else begin
      phase_reg <= next_sum[ACC_W-1:0];
      wrap      <= next_sum[ACC_W];
    end
  end

  assign offset_phase = phase_reg + omega;
  assign phase_out    = offset_phase[ACC_W-1 -: OUT_W];

endmodule
