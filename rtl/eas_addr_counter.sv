// Address counter AC (fast memory) and the address counter of the slow memory MS.
//
// A binary counter that wraps modulo 2**AW, which makes the memory a ring: after the last
// cell the next record goes into the first one again. The same counter is advanced by the
// write pulses while recording and by the computer's address switching pulses while
// reading, so a readout starts where recording stopped, at the oldest cell, and a full
// readout brings it back there.
//
// Interface: inc = advance by one this cycle; addr = current address (registered).
// The ring, the shared use for writing and reading and the readout from the oldest cell
// follow the document; the plain binary form and the reset to 0 are this design's.
module eas_addr_counter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (inc) addr <= addr + 1'b1;
  end

endmodule
