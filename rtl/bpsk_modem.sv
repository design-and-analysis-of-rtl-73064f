// bpsk_modem: binary phase shift keying modulator and coherent demodulator.
//
// Modulator: one frequency synthesizer generates a sine carrier. Each symbol
// carries one bit: bit 1 sends the sine, bit 0 its complement (the negated
// sine, 180 degrees away). Demodulator: the received samples are correlated
// with the sign of the same synthesizer's sine (see sign_correlator); a
// positive sum decodes as 1, a negative one as 0.
//
// Interface: delta_p sets the carrier frequency, f_clk*delta_p/2**16. A
// symbol is CYCLES_PER_SYM carrier periods and starts at carrier phase 0.
// sym_req is high in the cycle data_in is taken; data_in must be valid then.
// mod_out is registered: the first sample of a symbol appears one clock after
// its sym_req. rx_in is the received signal with the timing of mod_out (a
// direct loop-back, or a channel with no delay). demod_out is valid while
// demod_valid pulses, two clocks after the sym_req that ends the symbol, so a
// bit is decoded one symbol plus two clocks after it was taken.
// Sine carrier, complement for 0 and comparison with the local reference
// follow the published design; the symbol length, the correlator and the timing are
// this design's own.
module bpsk_modem
  import psk_pkg::*;
#(
  parameter int unsigned CYCLES_PER_SYM = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] delta_p,
  input  logic               data_in,
  output logic               sym_req,
  output sample_t            mod_out,
  input  sample_t            rx_in,
  output logic               demod_out,
  output logic               demod_valid
);

  sample_t carrier;
  logic    wrap;
  logic    start_d;
  sgn_e    ref_d;
  logic signed [CORR_W-1:0] corr;

  dfs u_dfs (
    .clk, .rst_n, .delta_p,
    .omega        (PH_0),
    .sample       (carrier),
    .sample_wrap  (wrap),
    .sample_phase ()
  );

  symbol_timer #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_tim (
    .clk, .rst_n, .wrap, .start (sym_req)
  );

  logic bit_now, bit_q;
  assign bit_now = sym_req ? data_in : bit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_q   <= 1'b0;
      mod_out <= '0;
      start_d <= 1'b0;
      ref_d   <= SGN_ZERO;
    end else begin
      bit_q   <= bit_now;
      mod_out <= bit_now ? carrier : -carrier;
      start_d <= sym_req;
      ref_d   <= sign_of(carrier);
    end
  end

  sign_correlator u_corr (
    .clk, .rst_n,
    .start      (start_d),
    .rx         (rx_in),
    .ref_sgn    (ref_d),
    .corr       (corr),
    .corr_valid (demod_valid)
  );

  assign demod_out = (corr > 0);

endmodule
