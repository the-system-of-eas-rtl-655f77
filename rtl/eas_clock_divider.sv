// Divider C100 of the control unit: 1 MHz pulses from the 100 MHz generator.
//
// A modulo-DIV counter advanced by each generator pulse (en). In the cycle where it
// wraps, tick is high for one clock. With DIV = 100 and one generator pulse every other
// 200 MHz cycle, tick comes once per microsecond. The document names the counter and the
// 1 MHz output; the counter form is this design's.
module eas_clock_divider #(
  parameter int unsigned DIV = eas_pkg::SLOW_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  localparam int unsigned CW = $clog2(DIV);
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= (cnt == LAST) ? '0 : cnt + 1'b1;
  end

  assign tick = en && (cnt == LAST);

endmodule
