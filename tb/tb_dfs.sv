// tb_dfs: end-to-end check of the frequency synthesizer.
// A behavioural phase model gives the 12-bit phase of every sample; each
// sample must lie within 1.5 % of full scale of
// 7800 * sin(2*pi*(phase12 + 0.5) / 4096), one clock after the phase. Three
// settings are run: a slow sine (delta_p = 64, 1024 samples per period), a
// cosine through omega = 0x4000, and a fast carrier (delta_p = 4096) whose
// period must be exactly 16 samples. Every quadrant and every segment of the
// piecewise-linear curve is visited.
module tb_dfs;
  import psk_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] delta_p = 16'd64, omega = 16'd0;
  sample_t     sample;
  logic        sample_wrap;
  logic [11:0] sample_phase;
  int checks = 0, failures = 0, cyc = 0;
  int m_ph = 0, m_fr = 64, ph_d1 = 0;
  bit m_wrap = 1'b1, wrap_d1 = 1'b0, valid_d1 = 1'b0;
  int last_wrap = -1;
  int quadrant_seen [4];
  int segment_seen [8];
  localparam real PI = 3.14159265358979;

  dfs dut (.clk, .rst_n, .delta_p, .omega, .sample, .sample_wrap, .sample_phase);

  always #5 clk = ~clk;

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
      if (valid_d1) begin
        real expv, err;
        int p12;
        p12  = ph_d1;
        expv = 7800.0 * $sin(2.0 * PI * (real'(p12) + 0.5) / 4096.0);
        err  = real'(sample) - expv;
        check(err <= 117.0 && err >= -117.0, $sformatf("sample %0d exp %0.1f", sample, expv));
        check(int'(sample_phase) == p12, "sample_phase");
        check(sample_wrap == wrap_d1, "sample_wrap");
        quadrant_seen[p12 >> 10]++;
        segment_seen[(p12 >> 7) & 7]++;
        if (delta_p == 16'd4096 && sample_wrap) begin
          if (last_wrap >= 0) check(cyc - last_wrap == 16, $sformatf("period %0d", cyc - last_wrap));
          last_wrap = cyc;
        end
      end
      valid_d1 = 1'b1;
      ph_d1   = ((m_ph + int'(omega)) & 16'hFFFF) >> 4;
      wrap_d1 = m_wrap;
      m_wrap  = (m_ph + m_fr) > 16'hFFFF;
      m_ph    = (m_ph + m_fr) & 16'hFFFF;
      m_fr    = int'(delta_p);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (1100) @(posedge clk);
    @(negedge clk) omega = 16'h4000;      // cosine
    repeat (1100) @(posedge clk);
    @(negedge clk) begin omega = 16'h0000; delta_p = 16'd4096; end
    repeat (200) @(posedge clk);
    for (int i = 0; i < 4; i++) check(quadrant_seen[i] > 0, "quadrant not visited");
    for (int i = 0; i < 8; i++) check(segment_seen[i] > 0, "segment not visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
