// EAS time-analysis recorder: one control unit and NCH detector time channels.
//
// Each channel records its detector continuously into two rings, 128 cells of 5 ns
// and 128 cells of 1 us. A fast master (trigger) lets both rings run on for half their
// length (320 ns and 64 us) and then stops them, so each ring holds the moments before
// and after the trigger. A main master keeps that picture until the computer has read it
// with 64 address switching pulses and sends the record permit; without a main master
// recording simply resumes. Readout needs no addresses: the pulse number, with the 3-bit
// trig_phase for the fast cells, gives the time of each cell relative to the master.
//
// Ports: hit[i] is the shaped pulse of detector i, one bit per clk cycle (5 ns).
// fast_data[i] = {earlier, later} fast cell and slow_data[i] = {earlier, later} slow cell
// of channel i at the current read position, valid while locked. A full readout takes
// half as many pulses as a ring has cells (64 by default).
//
// Timing of the cells: trig_phase is the position of the master sample inside its
// 8-sample fast frame. With P = FAST_WORDS*4 post-trigger cells, fast cell c = 2p + k
// (read pulse p, k = 0 earlier / 1 later) was taken (c - (P - 1) - ((trig_phase + 1) mod 8))
// samples after the master sample, i.e. (c - 63 - ((trig_phase + 1) mod 8)) x 5 ns by
// default. Slow cell c holds the microsecond ending (c + 1 - SLOW_CELLS/2) pulses of 1 MHz
// after the master: the master lies in cell SLOW_CELLS/2 (64), or in cell 63 when it
// coincides with a 1 MHz pulse.
//
// Parameters: NCH = 4 detectors as in the document's test set-up; FAST_WORDS and
// SLOW_CELLS set the ring lengths (document values by default: 16 words of 4 bits in each
// of M1 and M2, 128 slow cells). As in the document, the master sits in the middle of
// each ring: the post-trigger counts are half the ring. MAIN_WINDOW is this design's
// choice.
module eas_time_system #(
  parameter int unsigned NCH         = 4,
  parameter int unsigned FAST_WORDS  = eas_pkg::FAST_WORDS,
  parameter int unsigned SLOW_CELLS  = eas_pkg::SLOW_CELLS,
  parameter int unsigned MAIN_WINDOW = 400
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NCH-1:0]       hit,
  input  logic                 fast_master,
  input  logic                 main_master,
  input  logic                 record_permit,
  input  logic                 rd_pulse,
  output logic                 locked,
  output logic                 fast_run,
  output logic                 slow_run,
  output logic [2:0]           trig_phase,
  output logic [NCH-1:0][1:0]  fast_data,
  output logic [NCH-1:0][1:0]  slow_data
);

  localparam int unsigned RG_BITS   = eas_pkg::RG_BITS;
  localparam int unsigned POST_FAST = FAST_WORDS * RG_BITS;   // half of 2 x WORDS x 4 cells
  localparam int unsigned POST_SLOW = SLOW_CELLS / 2;

  logic           slow_tick;
  logic           rd_step;
  logic [2:0]     frame_pos [NCH];

  eas_control_unit #(
    .POST_FAST(POST_FAST), .POST_SLOW(POST_SLOW), .MAIN_WINDOW(MAIN_WINDOW)
  ) u_cu (
    .clk, .rst_n, .fast_master, .main_master, .record_permit, .rd_pulse,
    .frame_pos(frame_pos[0]), .fast_run, .slow_tick, .slow_run, .rd_step, .locked,
    .trig_phase
  );

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    eas_memory_block #(
      .FAST_WORDS(FAST_WORDS), .RG_BITS(RG_BITS), .SLOW_CELLS(SLOW_CELLS)
    ) u_mb (
      .clk, .rst_n, .hit(hit[i]), .fast_run, .slow_tick, .slow_run, .rd_step,
      .frame_pos(frame_pos[i]), .fast_data(fast_data[i]), .slow_data(slow_data[i])
    );
  end

endmodule
