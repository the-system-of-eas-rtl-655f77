// Counter C4 of the fast memory: gives the record-permit pulses of M1 and M2.
//
// It counts the shifts of Rg2 (the later of the two phases). When the BITS-th shift of a
// frame has happened both registers are full, and one cycle later wr pulses high for one
// cycle: the RAMs take the full registers and the address counter advances. The pulse is
// registered so that it still comes when the key closes right on the last shift. With a
// 100 MHz register clock and BITS = 4 this is the document's 25 MHz write rate.
//
// Interface: step = Rg2 shift enable; count = shifts so far in the current frame;
// wr = write pulse, one cycle after the frame fills.
module eas_write_counter #(
  parameter int unsigned BITS = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  output logic [$clog2(BITS)-1:0] count,
  output logic                    wr
);

  localparam int unsigned CW = $clog2(BITS);
  localparam logic [CW-1:0] LAST = CW'(BITS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      wr    <= 1'b0;
    end else begin
      wr <= step && (count == LAST);
      if (step) count <= (count == LAST) ? '0 : count + 1'b1;
    end
  end

endmodule
