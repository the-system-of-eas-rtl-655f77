// Memory block of one detector (one time channel).
//
// The shaped detector pulse goes to two recorders at once: the fast memory, a ring of
// 128 cells of 5 ns, and the slow memory, a ring of 128 cells of 1 us. Both are driven by
// the keyed pulses of the control unit and read by the same address switching pulses, so
// one readout of 64 pulses gives, per pulse, two fast cells and two slow cells, each
// pair in time order, starting with the oldest.
//
// Interface: see eas_fast_channel and eas_slow_channel; frame_pos comes from the fast
// memory and tells the control unit where in an 8-sample frame the current sample falls.
// The split into a fast and a slow memory per detector, and one train of read pulses for
// all address counters, follow the document.
module eas_memory_block #(
  parameter int unsigned FAST_WORDS = eas_pkg::FAST_WORDS,
  parameter int unsigned RG_BITS    = eas_pkg::RG_BITS,
  parameter int unsigned SLOW_CELLS = eas_pkg::SLOW_CELLS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     hit,
  input  logic                     fast_run,
  input  logic                     slow_tick,
  input  logic                     slow_run,
  input  logic                     rd_step,
  output logic [$clog2(RG_BITS):0] frame_pos,
  output logic [1:0]               fast_data,
  output logic [1:0]               slow_data
);

  eas_fast_channel #(.WORDS(FAST_WORDS), .RG_BITS(RG_BITS)) u_fast (
    .clk, .rst_n, .hit, .run(fast_run), .rd_step, .frame_pos, .rd_data(fast_data)
  );

  eas_slow_channel #(.CELLS(SLOW_CELLS)) u_slow (
    .clk, .rst_n, .hit, .tick(slow_tick), .run(slow_run), .rd_step, .rd_data(slow_data)
  );

endmodule
