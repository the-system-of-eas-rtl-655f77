// Shift register Rg1 / Rg2 of the fast memory.
//
// Serial in, parallel out. Each enabled cycle shifts the detector bit in at the LSB, so
// after BITS shifts the oldest of the collected samples is in the MSB. The parallel
// value is written into a RAM word once the register is full; it keeps shifting
// afterwards, which lets the 5 ns samples be stored by slower RAMs.
//
// Interface: shift = enable from the phase inverter, din = shaped detector bit,
// q = contents (registered). The 4-bit length follows from the document's 100 MHz
// register clock and 25 MHz write rate; the shift direction is this design's choice.
module eas_shift_reg #(
  parameter int unsigned BITS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,
  input  logic            din,
  output logic [BITS-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {q[BITS-2:0], din};
  end

endmodule
