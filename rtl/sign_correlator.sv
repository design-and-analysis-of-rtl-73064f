// sign_correlator: multiplier-less correlation of a received symbol with a
// reference carrier.
//
// Over one symbol it sums rx when the reference is positive and -rx when it is
// negative (samples where the reference is exactly zero add nothing). That is
// the correlation of rx with the sign of the reference, which for two carriers
// of the same frequency is proportional to the cosine of their phase
// difference. It is how the demodulators "compare" the received signal with a
// reference without a multiplier.
//
// Interface: start marks the first sample of a symbol. On that sample the sum
// of the symbol just finished is moved to corr and corr_valid pulses for one
// cycle (not on the very first start after reset, which has no finished
// symbol), and a new sum begins with the current sample.
// Timing: corr/corr_valid appear one clock after the start sample.
// This correlator is this design's own reading of "compared with the
// reference"; the published design does not say how the comparison is made.
module sign_correlator
  import psk_pkg::*;
#(
  parameter int unsigned W = CORR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  sample_t             rx,
  input  sgn_e                ref_sgn,
  output logic signed [W-1:0] corr,
  output logic                corr_valid
);

  logic signed [W-1:0] acc;
  logic signed [W-1:0] term;
  logic                have_prev;

  always_comb begin
    case (ref_sgn)
      SGN_POS: term = W'(rx);
      SGN_NEG: term = -W'(rx);
      default: term = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      corr       <= '0;
      corr_valid <= 1'b0;
      have_prev  <= 1'b0;
    end else if (start) begin
      corr       <= acc;
      corr_valid <= have_prev;
      have_prev  <= 1'b1;
      acc        <= term;
    end else begin
      corr_valid <= 1'b0;
      acc        <= acc + term;
    end
  end

endmodule
