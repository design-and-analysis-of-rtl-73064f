// symbol_timer: marks the first carrier sample of every symbol.
//
// A symbol lasts CYCLES_PER_SYM whole carrier periods and starts with the
// first sample of a period, so each symbol begins at carrier phase 0. The
// timer counts the carrier-period marks of the synthesizer (wrap) and raises
// start on every CYCLES_PER_SYM-th one, beginning with the first after reset.
//
// Interface: wrap is the synthesizer's first-sample-of-period flag; start is
// combinational from wrap and the count, so it is aligned with the same sample.
// The symbol length is this design's own choice: the modem descriptions only
// speak of a "suitable count value".
module symbol_timer #(
  parameter int unsigned CYCLES_PER_SYM = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wrap,
  output logic start
);

  localparam int unsigned CW = (CYCLES_PER_SYM > 1) ? $clog2(CYCLES_PER_SYM) : 1;
  logic [CW-1:0] cnt;

  assign start = wrap && (cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (wrap) begin
      cnt <= (32'(cnt) == CYCLES_PER_SYM - 1) ? '0 : cnt + CW'(1);
    end
  end

endmodule
