// tb_pwl_sine_converter: exhaustive check of the piecewise-linear quarter sine.
// For each of the 1024 quadrant phases p the magnitude must lie within 0.7 %
// of full scale of 7800 * sin((p + 0.5) * pi / 2048), the curve may step back by
// at most 80 at a segment boundary, and it must start near 0 and end near the peak.
module tb_pwl_sine_converter;
  import psk_pkg::*;
  logic [9:0]  phase_in;
  logic [14:0] amp_out;
  int checks = 0, failures = 0;
  real worst = 0.0;
  localparam real PI = 3.14159265358979;

  pwl_sine_converter dut (.phase_in, .amp_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int prev = 0;
    for (int p = 0; p < 1024; p++) begin
      real expv, err;
      phase_in = 10'(p);
      #1;
      expv = 7800.0 * $sin((real'(p) + 0.5) * PI / 2048.0);
      err  = real'(amp_out) - expv;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      check(err <= 55.0, $sformatf("p=%0d amp=%0d exp=%0.1f", p, amp_out, expv));
      check(int'(amp_out) + 80 >= prev, $sformatf("p=%0d drops by more than 80", p));
      prev = int'(amp_out);
    end
    phase_in = 10'd0;    #1; check(amp_out == 15'd0, "amp at 0");
    phase_in = 10'd1023; #1; check(amp_out >= 15'd7700 && amp_out <= 15'd7900, "amp at pi/2");
    $display("worst error %0.1f of 7800", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
