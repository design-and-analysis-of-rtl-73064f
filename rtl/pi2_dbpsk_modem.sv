// pi2_dbpsk_modem: differential BPSK on a cosine carrier, with differential
// (non-coherent) demodulation.
//
// Modulator: the transmitted symbol d is the XOR of the information bit and
// the previously transmitted symbol (d starts at 0 after reset). d = 0 sends
// the cosine from a frequency synthesizer with a quarter-period phase offset,
// d = 1 its complement, so a 1 bit flips the carrier phase by 180 degrees and
// a 0 bit keeps it.
// Demodulator: the received symbol is compared with the previous received
// symbol, which serves as the reference: the sign of every received sample is
// kept in a buffer of MAX_SPS entries indexed by the sample number inside the
// symbol, and the next symbol is correlated with those signs (see
// sign_correlator). A negative sum means the phase changed, i.e. bit 1. The
// first symbol after reset has no predecessor; it is compared with the local
// cosine, which is what a preceding d = 0 would have looked like.
//
// Interface and timing are those of bpsk_modem: sym_req marks the cycle
// data_in is taken, mod_out follows one clock later, rx_in has mod_out's
// timing, demod_out/demod_valid come two clocks after the sym_req that ends
// the symbol. A symbol may hold at most MAX_SPS samples
// (CYCLES_PER_SYM * 2**16 / delta_p); samples beyond are not used.
// XOR encoding, cosine carrier and the previous symbol as reference follow the
// published design; the sign buffer, its size, the first-symbol rule and the timing
// are this design's own.
module pi2_dbpsk_modem
  import psk_pkg::*;
#(
  parameter int unsigned CYCLES_PER_SYM = 1,
  parameter int unsigned MAX_SPS        = 2048
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

  localparam int unsigned IW = $clog2(MAX_SPS + 1);
  localparam int unsigned AW = (MAX_SPS > 1) ? $clog2(MAX_SPS) : 1;

  sample_t cosine;
  logic    wrap;
  logic    start_d;
  sgn_e    local_d;
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

  // ---- differential encoder ----
  logic d_now, d_q;
  assign d_now = sym_req ? (data_in ^ d_q) : d_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q     <= 1'b0;
      mod_out <= '0;
      start_d <= 1'b0;
      local_d <= SGN_ZERO;
    end else begin
      d_q     <= d_now;
      mod_out <= d_now ? -cosine : cosine;
      start_d <= sym_req;
      local_d <= sign_of(cosine);
    end
  end

  // ---- previous-symbol reference ----
  sgn_e            prev_sgn [MAX_SPS];
  logic [IW-1:0]   idx;        // sample number of rx_in inside its symbol
  logic [IW-1:0]   idx_now;
  logic            first_sym;  // rx_in belongs to the first symbol after reset
  logic            first_now;
  logic            seen_start;
  sgn_e            ref_sgn;

  assign idx_now   = start_d ? '0 : idx;
  assign first_now = start_d ? !seen_start : first_sym;

  always_comb begin
    if (first_now)                      ref_sgn = local_d;
    else if (32'(idx_now) < MAX_SPS)    ref_sgn = prev_sgn[idx_now[AW-1:0]];
    else                                ref_sgn = SGN_ZERO;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx        <= '0;
      first_sym  <= 1'b1;
      seen_start <= 1'b0;
    end else begin
      if (start_d) seen_start <= 1'b1;
      first_sym <= first_now;
      if (32'(idx_now) < MAX_SPS) idx <= idx_now + IW'(1);
      else                        idx <= idx_now;
    end
  end

  always_ff @(posedge clk) begin
    if (32'(idx_now) < MAX_SPS) prev_sgn[idx_now[AW-1:0]] <= sign_of(rx_in);
  end

  sign_correlator u_corr (
    .clk, .rst_n,
    .start      (start_d),
    .rx         (rx_in),
    .ref_sgn    (ref_sgn),
    .corr       (corr),
    .corr_valid (demod_valid)
  );

  assign demod_out = (corr < 0);

endmodule
