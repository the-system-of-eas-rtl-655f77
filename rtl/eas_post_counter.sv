// Post-trigger counter (C64 of the fast keys, C64S of the slow keys).
//
// Loaded with COUNT by the fast master, it counts down one per recorded cell and keeps
// the key open while it is not zero; when it reaches zero the key closes. clear empties
// it (recording resumed without a main master). The control unit also uses it as the
// window timer for the main master.
//
// Interface: load has priority over step; active = count not zero (registered).
// The count of 64 cells after the master follows the document; the down-counter form and
// the clear input are this design's.
module eas_post_counter #(
  parameter int unsigned COUNT = eas_pkg::POST_FAST
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic clear,
  input  logic step,
  output logic active
);

  localparam int unsigned CW = $clog2(COUNT + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (clear)              cnt <= '0;
    else if (load)               cnt <= CW'(COUNT);
    else if (step && cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign active = (cnt != '0);

endmodule
