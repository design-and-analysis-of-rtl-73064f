// qpsk_modem: quadrature phase shift keying, two bits per symbol.
//
// Modulator: two frequency synthesizers, locked to the same phase register
// step, generate a sine and a cosine. Each dibit selects one of the four
// carrier phases 0, 90, 180, 270 degrees, i.e. the sine, the cosine or the
// complement of either (Gray order, so neighbouring phases differ in one bit):
//     00 -> sine   01 -> cosine   11 -> -sine   10 -> -cosine
// Demodulator: the received symbol is correlated with the sign of the local
// sine and of the local cosine (two sign_correlators). The reference with the
// larger absolute correlation and the sign of that correlation give the phase,
// which maps back to the dibit.
//
// Interface and timing are those of bpsk_modem with 2-bit data: sym_req marks
// the cycle data_in is taken, mod_out follows one clock later, rx_in has
// mod_out's timing, demod_out/demod_valid come two clocks after the sym_req
// that ends the symbol.
// Two synthesizers, sine/cosine and their complements follow the published design;
// the bit-to-phase mapping, the correlators and the timing are this design's
// own.
module qpsk_modem
  import psk_pkg::*;
#(
  parameter int unsigned CYCLES_PER_SYM = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] delta_p,
  input  logic [1:0]         data_in,
  output logic               sym_req,
  output sample_t            mod_out,
  input  sample_t            rx_in,
  output logic [1:0]         demod_out,
  output logic               demod_valid
);

  sample_t sine, cosine;
  logic    wrap_s, wrap_c;
  logic    start_d;
  sgn_e    ref_s_d, ref_c_d;
  logic signed [CORR_W-1:0] corr_s, corr_c;
  logic    valid_s, valid_c;

  dfs u_dfs_sin (
    .clk, .rst_n, .delta_p,
    .omega        (PH_0),
    .sample       (sine),
    .sample_wrap  (wrap_s),
    .sample_phase ()
  );

  dfs u_dfs_cos (
    .clk, .rst_n, .delta_p,
    .omega        (PH_90),
    .sample       (cosine),
    .sample_wrap  (wrap_c),
    .sample_phase ()
  );

  symbol_timer #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_tim (
    .clk, .rst_n, .wrap (wrap_s), .start (sym_req)
  );

  logic [1:0] sym_now, sym_q;
  assign sym_now = sym_req ? data_in : sym_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_q   <= '0;
      mod_out <= '0;
      start_d <= 1'b0;
      ref_s_d <= SGN_ZERO;
      ref_c_d <= SGN_ZERO;
    end else begin
      sym_q   <= sym_now;
      case (sym_now)
        2'b00:   mod_out <= sine;
        2'b01:   mod_out <= cosine;
        2'b11:   mod_out <= -sine;
        default: mod_out <= -cosine;
      endcase
      start_d <= sym_req;
      ref_s_d <= sign_of(sine);
      ref_c_d <= sign_of(cosine);
    end
  end

  sign_correlator u_corr_s (
    .clk, .rst_n, .start (start_d), .rx (rx_in), .ref_sgn (ref_s_d),
    .corr (corr_s), .corr_valid (valid_s)
  );

  sign_correlator u_corr_c (
    .clk, .rst_n, .start (start_d), .rx (rx_in), .ref_sgn (ref_c_d),
    .corr (corr_c), .corr_valid (valid_c)
  );

  logic signed [CORR_W-1:0] abs_s, abs_c;
  assign abs_s = (corr_s < 0) ? -corr_s : corr_s;
  assign abs_c = (corr_c < 0) ? -corr_c : corr_c;

  always_comb begin
    if (abs_s >= abs_c) demod_out = (corr_s >= 0) ? 2'b00 : 2'b11;
    else                demod_out = (corr_c >= 0) ? 2'b01 : 2'b10;
  end

  assign demod_valid = valid_s;

  // Both synthesizers share reset and phase step, so their period marks and
  // their correlators always agree.
  assert property (@(posedge clk) disable iff (!rst_n) wrap_s == wrap_c);
  assert property (@(posedge clk) disable iff (!rst_n) valid_s == valid_c);

endmodule
