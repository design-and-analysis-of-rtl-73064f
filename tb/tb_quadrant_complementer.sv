// tb_quadrant_complementer: exhaustive check of the quadrant fold.
// For every 10-bit phase and both values of the second phase MSB, the output
// must be the phase itself (first/third quadrant) or 1023 minus it
// (second/fourth quadrant).
module tb_quadrant_complementer;
  logic       msb2;
  logic [9:0] phase_in, phase_out;
  int checks = 0, failures = 0;

  quadrant_complementer #(.W(10)) dut (.msb2, .phase_in, .phase_out);

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int p = 0; p < 1024; p++) begin
        int expv;
        msb2 = 1'(m);
        phase_in = 10'(p);
        #1;
        expv = (m == 1) ? 1023 - p : p;
        checks++;
        if (int'(phase_out) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL msb2=%0d in=%0d out=%0d exp=%0d", m, p, phase_out, expv);
        end
      end
    end
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
