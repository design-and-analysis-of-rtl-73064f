// pi4_qpsk_modem: the pi/4 QPSK modem, three bits per symbol on eight carrier
// phases 45 degrees apart.
//
// Modulator: four frequency synthesizers, locked to the same phase register
// step, generate the carrier at phases 0 (sine), +45 (a cosine delayed by 45
// degrees, "sig-45"), +90 (cosine) and -45 degrees (a cosine delayed by 135
// degrees, "sig-135"). Those four waveforms and their complements are the
// eight phases k*45 degrees, k = 0..7. A 3-bit symbol selects phase k, where
// the symbol is the Gray code of k (k ^ (k >> 1)), so neighbouring phases
// differ in one bit.
// Demodulator: the received symbol is correlated with the sign of each of the
// four local waveforms. The waveform with the largest absolute correlation and
// that correlation's sign give k, and the Gray code of k is the decoded symbol.
//
// Interface and timing are those of bpsk_modem with 3-bit data: sym_req marks
// the cycle data_in is taken, mod_out follows one clock later, rx_in has
// mod_out's timing, demod_out/demod_valid come two clocks after the sym_req
// that ends the symbol.
// Four synthesizers, the cosine, sig-45 and sig-135 waveforms with their
// complements and 3 bits per symbol follow the published design; the bit-to-phase
// mapping, the correlators and the timing are this design's own.
module pi4_qpsk_modem
  import psk_pkg::*;
#(
  parameter int unsigned CYCLES_PER_SYM = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] delta_p,
  input  logic [2:0]         data_in,
  output logic               sym_req,
  output sample_t            mod_out,
  input  sample_t            rx_in,
  output logic [2:0]         demod_out,
  output logic               demod_valid
);

  // Phase offsets of the four synthesizers: 0, +45, +90, -45 degrees.
  localparam logic [PHASE_W-1:0] OMEGA [4] = '{PH_0, PH_45, PH_90, PH_M45};

  sample_t wave   [4];
  logic    wrap   [4];
  sgn_e    ref_d  [4];
  logic signed [CORR_W-1:0] corr     [4];
  logic signed [CORR_W-1:0] corr_abs [4];
  logic    valid  [4];
  logic    start_d;

  for (genvar i = 0; i < 4; i++) begin : g_dfs
    dfs u_dfs (
      .clk, .rst_n, .delta_p,
      .omega        (OMEGA[i]),
      .sample       (wave[i]),
      .sample_wrap  (wrap[i]),
      .sample_phase ()
    );
  end

  symbol_timer #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_tim (
    .clk, .rst_n, .wrap (wrap[0]), .start (sym_req)
  );

  function automatic logic [2:0] gray_to_bin(input logic [2:0] g);
    return {g[2], g[2] ^ g[1], g[2] ^ g[1] ^ g[0]};
  endfunction

  // Phase k*45 degrees as one of the four waveforms or its complement.
  function automatic sample_t phase_wave(input logic [2:0] k, input sample_t w [4]);
    case (k)
      3'd0:    return w[0];
      3'd1:    return w[1];
      3'd2:    return w[2];
      3'd3:    return -w[3];
      3'd4:    return -w[0];
      3'd5:    return -w[1];
      3'd6:    return -w[2];
      default: return w[3];
    endcase
  endfunction

  logic [2:0] sym_now, sym_q;
  assign sym_now = sym_req ? data_in : sym_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_q   <= '0;
      mod_out <= '0;
      start_d <= 1'b0;
      for (int i = 0; i < 4; i++) ref_d[i] <= SGN_ZERO;
    end else begin
      sym_q   <= sym_now;
      mod_out <= phase_wave(gray_to_bin(sym_now), wave);
      start_d <= sym_req;
      for (int i = 0; i < 4; i++) ref_d[i] <= sign_of(wave[i]);
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_corr
    sign_correlator u_corr (
      .clk, .rst_n, .start (start_d), .rx (rx_in), .ref_sgn (ref_d[i]),
      .corr (corr[i]), .corr_valid (valid[i])
    );
    assign corr_abs[i] = (corr[i] < 0) ? -corr[i] : corr[i];
  end

  // Pick the reference with the largest |correlation|; its sign selects the
  // waveform or its complement.
  logic [1:0] best;
  logic [2:0] k_rx;
  always_comb begin
    best = 2'd0;
    for (int i = 1; i < 4; i++)
      if (corr_abs[i] > corr_abs[best]) best = 2'(i);
    case (best)
      2'd0:    k_rx = (corr[0] >= 0) ? 3'd0 : 3'd4;
      2'd1:    k_rx = (corr[1] >= 0) ? 3'd1 : 3'd5;
      2'd2:    k_rx = (corr[2] >= 0) ? 3'd2 : 3'd6;
      default: k_rx = (corr[3] >= 0) ? 3'd7 : 3'd3;
    endcase
  end

  assign demod_out   = k_rx ^ (k_rx >> 1);
  assign demod_valid = valid[0];

  // All four synthesizers share reset and phase step, so they stay locked.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wrap[0] == wrap[1] && wrap[0] == wrap[2] && wrap[0] == wrap[3]);

endmodule
