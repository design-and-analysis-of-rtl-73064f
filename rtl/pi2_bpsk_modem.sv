// pi2_bpsk_modem: the pi/2 BPSK modem, a BPSK modem on a cosine carrier.
//
// Modulator: one frequency synthesizer, given a phase offset of a quarter
// period, generates a cosine carrier. Bit 1 sends the cosine, bit 0 its
// complement; the transmitted signal is thus 90 degrees away from that of the
// sine-carrier BPSK modem. Demodulator: the received samples are correlated
// with the sign of the same synthesizer's cosine; positive decodes as 1.
//
// Interface and timing are those of bpsk_modem: sym_req marks the cycle
// data_in is taken, mod_out follows one clock later, rx_in has mod_out's
// timing, and demod_out/demod_valid come two clocks after the sym_req that
// ends the symbol.
// The cosine carrier and the complement for 0 follow the published modem
// description. (Its overview describes pi/2 BPSK as a +-90 degree rotation from
// symbol to symbol; this design follows the modem description instead.) The
// symbol length, the correlator and the timing are this design's own.
module pi2_bpsk_modem
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

  sample_t cosine;
  logic    wrap;
  logic    start_d;
  sgn_e    ref_d;
  logic signed [CORR_W-1:0] corr;

  dfs u_dfs (
    .clk, .rst_n, .delta_p,
    .omega        (PH_90),
    .sample       (cosine),
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
      mod_out <= bit_now ? cosine : -cosine;
      start_d <= sym_req;
      ref_d   <= sign_of(cosine);
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
