// psk_modems_top: five PSK modems built on one kind of frequency synthesizer,
// side by side.
//
// The modems are BPSK (sine carrier), pi/2 BPSK (cosine carrier), pi/2 DBPSK
// (differentially encoded, cosine carrier, previous-symbol reference), QPSK
// (2 bits per symbol on sine/cosine and their complements) and pi/4 QPSK
// (3 bits per symbol on eight phases from four synthesizers). Each modem's
// modulator output is looped back into its own demodulator, as in a
// modulation/demodulation test of the modems; the modulated signals are also
// brought out. All modems share the carrier phase increment delta_p and the
// symbol length, but each has its own data input and symbol request.
//
// Interface, per modem (bpsk, pi2_bpsk, pi2_dbpsk, qpsk, pi4_qpsk):
// <m>_data_in is taken in the cycle <m>_sym_req is high; <m>_mod_out is the
// modulated carrier (15-bit two's complement, peak about 7800);
// <m>_demod_out is the decoded symbol, valid while <m>_demod_valid pulses.
// Timing: carrier frequency f_clk*delta_p/2**16, symbol = CYCLES_PER_SYM
// carrier periods; a symbol is decoded one symbol plus two clocks after it is
// taken. The loop-back and the shared delta_p are this design's own choices.
module psk_modems_top
  import psk_pkg::*;
#(
  parameter int unsigned CYCLES_PER_SYM = 1,
  parameter int unsigned MAX_SPS        = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] delta_p,

  input  logic               bpsk_data_in,
  output logic               bpsk_sym_req,
  output sample_t            bpsk_mod_out,
  output logic               bpsk_demod_out,
  output logic               bpsk_demod_valid,

  input  logic               pi2_bpsk_data_in,
  output logic               pi2_bpsk_sym_req,
  output sample_t            pi2_bpsk_mod_out,
  output logic               pi2_bpsk_demod_out,
  output logic               pi2_bpsk_demod_valid,

  input  logic               pi2_dbpsk_data_in,
  output logic               pi2_dbpsk_sym_req,
  output sample_t            pi2_dbpsk_mod_out,
  output logic               pi2_dbpsk_demod_out,
  output logic               pi2_dbpsk_demod_valid,

  input  logic [1:0]         qpsk_data_in,
  output logic               qpsk_sym_req,
  output sample_t            qpsk_mod_out,
  output logic [1:0]         qpsk_demod_out,
  output logic               qpsk_demod_valid,

  input  logic [2:0]         pi4_qpsk_data_in,
  output logic               pi4_qpsk_sym_req,
  output sample_t            pi4_qpsk_mod_out,
  output logic [2:0]         pi4_qpsk_demod_out,
  output logic               pi4_qpsk_demod_valid
);

  bpsk_modem #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_bpsk (
    .clk, .rst_n, .delta_p,
    .data_in     (bpsk_data_in),
    .sym_req     (bpsk_sym_req),
    .mod_out     (bpsk_mod_out),
    .rx_in       (bpsk_mod_out),
    .demod_out   (bpsk_demod_out),
    .demod_valid (bpsk_demod_valid)
  );

  pi2_bpsk_modem #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_pi2_bpsk (
    .clk, .rst_n, .delta_p,
    .data_in     (pi2_bpsk_data_in),
    .sym_req     (pi2_bpsk_sym_req),
    .mod_out     (pi2_bpsk_mod_out),
    .rx_in       (pi2_bpsk_mod_out),
    .demod_out   (pi2_bpsk_demod_out),
    .demod_valid (pi2_bpsk_demod_valid)
  );

  pi2_dbpsk_modem #(.CYCLES_PER_SYM(CYCLES_PER_SYM), .MAX_SPS(MAX_SPS)) u_pi2_dbpsk (
    .clk, .rst_n, .delta_p,
    .data_in     (pi2_dbpsk_data_in),
    .sym_req     (pi2_dbpsk_sym_req),
    .mod_out     (pi2_dbpsk_mod_out),
    .rx_in       (pi2_dbpsk_mod_out),
    .demod_out   (pi2_dbpsk_demod_out),
    .demod_valid (pi2_dbpsk_demod_valid)
  );

  qpsk_modem #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_qpsk (
    .clk, .rst_n, .delta_p,
    .data_in     (qpsk_data_in),
    .sym_req     (qpsk_sym_req),
    .mod_out     (qpsk_mod_out),
    .rx_in       (qpsk_mod_out),
    .demod_out   (qpsk_demod_out),
    .demod_valid (qpsk_demod_valid)
  );

  pi4_qpsk_modem #(.CYCLES_PER_SYM(CYCLES_PER_SYM)) u_pi4_qpsk (
    .clk, .rst_n, .delta_p,
    .data_in     (pi4_qpsk_data_in),
    .sym_req     (pi4_qpsk_sym_req),
    .mod_out     (pi4_qpsk_mod_out),
    .rx_in       (pi4_qpsk_mod_out),
    .demod_out   (pi4_qpsk_demod_out),
    .demod_valid (pi4_qpsk_demod_valid)
  );

endmodule
