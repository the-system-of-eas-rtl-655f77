// Small RAM used for the memories M1, M2 and the slow memory MS.
//
// Synchronous write on the clock edge when we is high, asynchronous (combinational) read,
// like the small ECL RAM chips of the original. The array is not reset: every cell is
// written by the ring before it is read out in normal use.
//
// Interface: we/waddr/wdata write port; raddr -> rdata read port, valid in the same cycle.
// Size: WORDS x WIDTH; the default 16 x 4 is the 64-bit capacity of M1 and M2 given in
// the document. The write/read timing is this design's model of such a chip.
module eas_ram #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned WIDTH = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
