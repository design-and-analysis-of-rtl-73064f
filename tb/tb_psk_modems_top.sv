// tb_psk_modems_top: end-to-end test of the five modems at the top's default
// parameters (one carrier period per symbol, 2048-entry DBPSK buffer).
//
// All modems run at once on random data while the shared carrier frequency
// hops through four phase increments: 2048 (32 samples per symbol), 1024
// (64), 63 (1041 or 1040 samples, close to the 2048-entry limit of the
// differential demodulator) and 4096 (16). Every decoded symbol is compared
// with the one sent, in order. Counted mechanisms, each of which must occur:
//   * every symbol value of every modem sent and decoded,
//   * frequency hops with decoding correct across them,
//   * DBPSK: a phase flip (bit 1) and a kept phase (bit 0), and the first
//     symbol after reset decoded against the local reference,
//   * mod_out of every modem reaching both signs near the peak amplitude.
// Differential detection compares a symbol with the one before, so a DBPSK
// symbol whose neighbours ran at another carrier frequency is not checked
// (it is counted as skipped).
module tb_psk_modems_top;
  import psk_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] delta_p = 16'd2048;

  logic       b_in, b_req, b_out, b_val;
  logic       p2_in, p2_req, p2_out, p2_val;
  logic       d_in, d_req, d_out, d_val;
  logic [1:0] q_in, q_out;
  logic       q_req, q_val;
  logic [2:0] p4_in, p4_out;
  logic       p4_req, p4_val;
  sample_t    b_mod, p2_mod, d_mod, q_mod, p4_mod;

  psk_modems_top dut (
    .clk, .rst_n, .delta_p,
    .bpsk_data_in (b_in),  .bpsk_sym_req (b_req),  .bpsk_mod_out (b_mod),
    .bpsk_demod_out (b_out), .bpsk_demod_valid (b_val),
    .pi2_bpsk_data_in (p2_in), .pi2_bpsk_sym_req (p2_req), .pi2_bpsk_mod_out (p2_mod),
    .pi2_bpsk_demod_out (p2_out), .pi2_bpsk_demod_valid (p2_val),
    .pi2_dbpsk_data_in (d_in), .pi2_dbpsk_sym_req (d_req), .pi2_dbpsk_mod_out (d_mod),
    .pi2_dbpsk_demod_out (d_out), .pi2_dbpsk_demod_valid (d_val),
    .qpsk_data_in (q_in), .qpsk_sym_req (q_req), .qpsk_mod_out (q_mod),
    .qpsk_demod_out (q_out), .qpsk_demod_valid (q_val),
    .pi4_qpsk_data_in (p4_in), .pi4_qpsk_sym_req (p4_req), .pi4_qpsk_mod_out (p4_mod),
    .pi4_qpsk_demod_out (p4_out), .pi4_qpsk_demod_valid (p4_val)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int epoch = 0;                  // number of frequency hops so far
  int hops_crossed = 0;           // symbols decoded correctly after a hop
  int dbpsk_skipped = 0, dbpsk_flip = 0, dbpsk_keep = 0, dbpsk_first = 0;

  // Sent-symbol queues, one per modem (modem index 0..4).
  int sent_q [5][$];
  int sent_epoch [5][$];
  int seen_tx [5][8];
  int seen_rx [5][8];
  int peak_pos [5];
  int peak_neg [5];
  int decoded [5];
  int last_epoch_ok [5];

  // DBPSK: epoch of every request, to judge whether a symbol's neighbours
  // ran at the same frequency.
  int d_req_epoch [$];
  int d_dec_count = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic on_req(input int m, input int v);
    sent_q[m].push_back(v);
    sent_epoch[m].push_back(epoch);
    seen_tx[m][v]++;
  endtask

  task automatic on_dec(input int m, input int v);
    int s, e;
    if (sent_q[m].size() == 0) begin
      check(1'b0, $sformatf("modem %0d decoded with nothing sent", m));
      return;
    end
    s = sent_q[m].pop_front();
    e = sent_epoch[m].pop_front();
    decoded[m]++;
    if (m == 2) begin
      int k;
      k = d_dec_count++;
      if (k > 0 && !(d_req_epoch[k - 1] == d_req_epoch[k] &&
                     k + 1 < d_req_epoch.size() && d_req_epoch[k + 1] == d_req_epoch[k])) begin
        dbpsk_skipped++;
        return;
      end
      if (k == 0) dbpsk_first++;
      if (s == 1) dbpsk_flip++; else dbpsk_keep++;
    end
    check(v == s, $sformatf("modem %0d decoded %0d sent %0d", m, v, s));
    if (v == s) begin
      seen_rx[m][v]++;
      if (e != last_epoch_ok[m]) begin
        hops_crossed++;
        last_epoch_ok[m] = e;
      end
    end
  endtask

  task automatic peaks(input int m, input sample_t x);
    if (x > 7000)  peak_pos[m]++;
    if (x < -7000) peak_neg[m]++;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (b_req)  on_req(0, int'(b_in));
      if (p2_req) on_req(1, int'(p2_in));
      if (d_req) begin
        on_req(2, int'(d_in));
        d_req_epoch.push_back(epoch);
      end
      if (q_req)  on_req(3, int'(q_in));
      if (p4_req) on_req(4, int'(p4_in));
      if (b_val)  on_dec(0, int'(b_out));
      if (p2_val) on_dec(1, int'(p2_out));
      if (d_val)  on_dec(2, int'(d_out));
      if (q_val)  on_dec(3, int'(q_out));
      if (p4_val) on_dec(4, int'(p4_out));
      peaks(0, b_mod); peaks(1, p2_mod); peaks(2, d_mod); peaks(3, q_mod); peaks(4, p4_mod);
    end
  end

  always @(negedge clk) begin
    b_in  <= 1'($urandom);
    p2_in <= 1'($urandom);
    d_in  <= 1'($urandom);
    q_in  <= 2'($urandom);
    p4_in <= 3'($urandom);
  end

  task automatic hop(input logic [15:0] dp, input int cycles);
    @(negedge clk);
    delta_p = dp;
    epoch++;
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    for (int m = 0; m < 5; m++) last_epoch_ok[m] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (32 * 120) @(posedge clk);     // delta_p 2048
    hop(16'd1024, 64 * 60);
    hop(16'd63, 1041 * 8);                 // increment 6'b111111 used in the published simulations
    hop(16'd4096, 16 * 200);
    hop(16'd2048, 32 * 10);
    // Summary of the mechanisms.
    for (int m = 0; m < 5; m++) begin
      int nv;
      nv = (m < 3) ? 2 : (m == 3) ? 4 : 8;
      for (int v = 0; v < nv; v++)
        check(seen_tx[m][v] > 0 && seen_rx[m][v] > 0,
              $sformatf("modem %0d symbol %0d never sent and decoded", m, v));
      check(peak_pos[m] > 0 && peak_neg[m] > 0, $sformatf("modem %0d never reached the peaks", m));
      check(decoded[m] > 300, $sformatf("modem %0d decoded only %0d", m, decoded[m]));
      check(last_epoch_ok[m] == epoch, $sformatf("modem %0d not decoding after the last hop", m));
    end
    check(hops_crossed >= 5 * 3, "frequency hops not crossed");
    check(dbpsk_flip > 0 && dbpsk_keep > 0, "DBPSK flip/keep");
    check(dbpsk_first == 1, "DBPSK first symbol");
    $display("decoded per modem: %0d %0d %0d %0d %0d", decoded[0], decoded[1], decoded[2], decoded[3], decoded[4]);
    $display("hops: %0d, hop crossings decoded: %0d, DBPSK flips %0d keeps %0d first %0d skipped %0d",
             epoch, hops_crossed, dbpsk_flip, dbpsk_keep, dbpsk_first, dbpsk_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
