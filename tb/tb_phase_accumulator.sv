// tb_phase_accumulator: checks the phase accumulator cycle by cycle against
// a behavioural model (a frequency register that loads delta_p every clock
// and a 16-bit phase sum), with random phase offsets and random changes of
// the phase increment. It also checks the carrier-period rate: with
// delta_p = 4096 the wrap flag must come every 16 clocks.
module tb_phase_accumulator;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] delta_p = 16'd4096, omega = 16'd0;
  logic [11:0] phase_out;
  logic        wrap;
  int checks = 0, failures = 0, cyc = 0;
  int m_ph = 0, m_fr = 0;
  bit m_wrap = 1'b1;
  int last_wrap = -1, wraps = 0;

  phase_accumulator dut (.clk, .rst_n, .delta_p, .omega, .phase_out, .wrap);

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
      check(int'(phase_out) == (((m_ph + int'(omega)) & 16'hFFFF) >> 4),
            $sformatf("phase %0d model %0d", phase_out, m_ph));
      check(wrap == m_wrap, "wrap");
      if (cyc < 400 && wrap) begin
        if (last_wrap >= 0) check(cyc - last_wrap == 16, $sformatf("period %0d", cyc - last_wrap));
        last_wrap = cyc;
        wraps++;
      end
      m_wrap = (m_ph + m_fr) > 16'hFFFF;
      m_ph   = (m_ph + m_fr) & 16'hFFFF;
      m_fr   = int'(delta_p);
    end else begin
      m_fr = int'(delta_p);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (400) @(posedge clk);
    check(wraps >= 24, "too few wraps at delta_p=4096");
    repeat (20) begin
      @(negedge clk);
      delta_p = 16'($urandom);
      omega   = 16'($urandom);
      repeat ($urandom_range(1, 50)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
