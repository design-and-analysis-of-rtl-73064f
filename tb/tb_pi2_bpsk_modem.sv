// tb_pi2_bpsk_modem: self-checking testbench for pi2_bpsk_modem.
//
// The modulator output is looped back into the demodulator. The carrier runs
// at 32 samples per period (delta_p = 2048) and a symbol lasts CPS = 2
// carrier periods, i.e. 64 clocks. Random symbols are offered on every
// sym_req. The bench checks, independently of the design:
//   * every mod_out sample against AMP * sin(carrier phase + symbol phase),
//     with the phase taken from a model of the phase register and the symbol
//     phase from the modulation rule (bit 1 = cosine, bit 0 = its complement), to within 1.5 % of the peak;
//   * the spacing of sym_req (one per 64 clocks);
//   * every decoded symbol against the symbol sent, and its latency
//     (64 + 2 clocks after the sym_req that took it);
//   * that every symbol value was sent and decoded at least once.
module tb_pi2_bpsk_modem;
  import psk_pkg::*;

  localparam int          CPS  = 2;
  localparam logic [15:0] DP   = 16'd2048;
  localparam int          SPS  = CPS * 65536 / 2048;
  localparam int          NSYM = 64;
  localparam int          DW   = 1;
  localparam real         AMP  = 7800.0;
  localparam real         TOL  = 120.0;
  localparam real         PI   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0]   delta_p = DP;
  logic [DW-1:0] data_in = '0;
  logic          sym_req;
  sample_t       mod_out;
  logic [DW-1:0] demod_out;
  logic          demod_valid;

  pi2_bpsk_modem #(.CYCLES_PER_SYM(CPS)) dut (
    .clk, .rst_n, .delta_p, .data_in, .sym_req, .mod_out,
    .rx_in (mod_out), .demod_out, .demod_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int sent = 0, decoded = 0;
  int last_req = -1;
  int seen_tx [1 << DW];
  int seen_rx [1 << DW];

  // Model of the phase register and the frequency register.
  longint m_ph = 0, m_fr = longint'(DP);
  longint ph_d1 = 0, ph_d2 = 0;
  real    symph_now = 0.0, symph_d1 = 0.0;
  logic   started = 1'b0;
  logic   started_d1 = 1'b0, started_d2 = 1'b0;
  int     diff_state = 0;   // differential encoder model (used by DBPSK)

  logic [DW-1:0] q_sym [$];
  int            q_t   [$];

  function automatic real sym_phase(input logic [DW-1:0] s);
    return s[0] ? PI / 2.0 : 3.0 * PI / 2.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // ---- modulated samples ----
      if (started_d2) begin
        real ph12, expv;
        ph12 = real'((ph_d2 >> 4) & 12'hFFF);
        expv = AMP * $sin(2.0 * PI * (ph12 + 0.5) / 4096.0 + symph_d1);
        check((real'(mod_out) - expv) <= TOL && (expv - real'(mod_out)) <= TOL,
              $sformatf("mod_out %0d expected %0.1f", mod_out, expv));
      end
      // ---- symbol requests ----
      if (sym_req) begin
        if (last_req >= 0) check(cyc - last_req == SPS, $sformatf("sym_req spacing %0d", cyc - last_req));
        last_req = cyc;
        q_sym.push_back(data_in);
        q_t.push_back(cyc);
        seen_tx[data_in]++;
        symph_now = sym_phase(data_in);
        sent++;
      end
      // ---- decoded symbols ----
      if (demod_valid) begin
        if (q_sym.size() == 0) check(1'b0, "demod_valid with nothing sent");
        else begin
          logic [DW-1:0] s;
          int t;
          s = q_sym.pop_front();
          t = q_t.pop_front();
          check(demod_out == s, $sformatf("decoded %0d sent %0d", demod_out, s));
          check(cyc - t == SPS + 2, $sformatf("latency %0d", cyc - t));
          seen_rx[demod_out]++;
          decoded++;
        end
      end
      // ---- advance the models ----
      started_d2 = started_d1;
      started_d1 = started;
      started = 1'b1;
      ph_d2 = ph_d1;
      ph_d1 = m_ph;
      symph_d1 = symph_now;
      m_ph = (m_ph + m_fr) & 64'hFFFF;
      m_fr = longint'(delta_p);
    end
  end

  // New random data right after each edge on which a symbol was taken.
  always @(negedge clk) data_in <= DW'($urandom);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (decoded == NSYM);
    @(posedge clk);
    for (int v = 0; v < (1 << DW); v++) begin
      check(seen_tx[v] > 0 && seen_rx[v] > 0, $sformatf("symbol %0d never sent/decoded", v));
    end
    $display("%0d symbols sent, %0d decoded", sent, decoded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat ((NSYM + 10) * SPS + 100) @(posedge clk);
    failures++;
    $display("watchdog: only %0d symbols decoded", decoded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
