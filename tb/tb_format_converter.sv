// tb_format_converter: the sign stage of the synthesizer. With msb1 clear
// the magnitude must pass unchanged; with msb1 set it must come out negated,
// in two's complement. Edge values and random magnitudes are tried.
module tb_format_converter;
  logic               msb1;
  logic [14:0]        mag_in;
  logic signed [14:0] sample_out;
  int checks = 0, failures = 0;

  format_converter #(.W(15)) dut (.msb1, .mag_in, .sample_out);

  task automatic try(input int m, input bit neg);
    int expv;
    msb1 = neg;
    mag_in = 15'(m);
    #1;
    expv = neg ? -m : m;
    checks++;
    if (int'(sample_out) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL msb1=%0d mag=%0d out=%0d", neg, m, sample_out);
    end
  endtask

  initial begin
    try(0, 0); try(0, 1); try(1, 1); try(7800, 0); try(7800, 1); try(16383, 1);
    for (int i = 0; i < 2000; i++) try($urandom_range(0, 16383), 1'($urandom));
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
