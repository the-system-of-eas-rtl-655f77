// Phase inverter PI of a time channel.
//
// The 100 MHz pulses from the control unit are split into two trains of the same
// polarity, half a period apart, which clock the shift registers Rg1 and Rg2 in turn.
// Here the design runs on one 200 MHz clock (each cycle is one half period of the
// 100 MHz generator), so the two trains are alternate-cycle enables: ph_a in one half
// period, ph_b in the next. A toggle flip-flop tracks which half period is next; it
// only advances while the key (run) is open, so the alternation survives a pause.
//
// Interface: run = key K open. ph_a / ph_b = shift enables for Rg1 / Rg2, active in
// the same cycle as run. phase = 1 when the next enable is ph_b.
// The split into two anti-phase trains follows the document; the single-clock
// enable form and the reset to phase 0 are this design's choices.
module eas_phase_inverter (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic ph_a,
  output logic ph_b,
  output logic phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   phase <= 1'b0;
    else if (run) phase <= ~phase;
  end

  assign ph_a = run & ~phase;
  assign ph_b = run &  phase;

endmodule
