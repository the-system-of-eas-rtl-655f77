// Fast memory of one time channel: a 128-cell ring of 5 ns cells.
//
// How it works: the phase inverter hands alternate samples of the detector bit to two
// shift registers, Rg1 (even samples) and Rg2 (odd samples). When both hold RG_BITS
// samples, the write counter C4 writes them into RAMs M1 and M2 at the address from the
// address counter AC, and AC advances. Eight successive samples (a "frame") thus land in
// one word of M1 and the same word of M2, and 16 words make the 128-cell ring, so the
// memory always holds the last 640 ns. Recording runs while the key K (run) is open.
//
// Reading (run low): each rd_step pulse moves a 2-bit bit counter below AC; when it wraps,
// AC advances. rd_data shows, for the current position, the M1 bit and the M2 bit, i.e.
// two successive samples, M1 the earlier. Since AC stops on the word that would be
// overwritten next, the first pulse position is the oldest frame, and 64 pulses read all
// 128 cells in time order and leave AC where it was.
//
// Timing: one sample per clk (5 ns at 200 MHz). A RAM write happens one cycle after a
// frame fills. frame_pos = {C4 count, PI phase} is the slot (0..7) that the sample taken
// in the current cycle will occupy within its frame.
//
// From the document: Rg1/Rg2 alternation, 4-bit registers written at 25 MHz, M1/M2 of
// 64 bits each, common address counter, 64 readout pulses starting at the oldest cell.
// This design's choices: the single-clock enable form, bit-serial readout of two bits per
// pulse, and that samples still in the registers when K closes are written only after
// recording resumes.
module eas_fast_channel #(
  parameter int unsigned WORDS   = eas_pkg::FAST_WORDS,
  parameter int unsigned RG_BITS = eas_pkg::RG_BITS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       hit,
  input  logic                       run,
  input  logic                       rd_step,
  output logic [$clog2(RG_BITS):0]   frame_pos,
  output logic [1:0]                 rd_data
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned BW = $clog2(RG_BITS);
  localparam logic [BW-1:0] LAST_BIT = BW'(RG_BITS - 1);

  logic               ph_a, ph_b, phase;
  logic [RG_BITS-1:0] rg1, rg2;
  logic [BW-1:0]      c4_count;
  logic               wr;
  logic [AW-1:0]      ac;
  logic [BW-1:0]      rd_bit;
  logic               ac_inc;
  logic [RG_BITS-1:0] m1_word, m2_word;

  eas_phase_inverter u_pi (
    .clk, .rst_n, .run, .ph_a, .ph_b, .phase
  );

  eas_shift_reg #(.BITS(RG_BITS)) u_rg1 (
    .clk, .rst_n, .shift(ph_a), .din(hit), .q(rg1)
  );

  eas_shift_reg #(.BITS(RG_BITS)) u_rg2 (
    .clk, .rst_n, .shift(ph_b), .din(hit), .q(rg2)
  );

  eas_write_counter #(.BITS(RG_BITS)) u_c4 (
    .clk, .rst_n, .step(ph_b), .count(c4_count), .wr
  );

  // Bit position of the readout inside the addressed word.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rd_bit <= '0;
    else if (rd_step) rd_bit <= (rd_bit == LAST_BIT) ? '0 : rd_bit + 1'b1;
  end

  assign ac_inc = wr | (rd_step && rd_bit == LAST_BIT);

  eas_addr_counter #(.AW(AW)) u_ac (
    .clk, .rst_n, .inc(ac_inc), .addr(ac)
  );

  eas_ram #(.WORDS(WORDS), .WIDTH(RG_BITS)) u_m1 (
    .clk, .we(wr), .waddr(ac), .wdata(rg1), .raddr(ac), .rdata(m1_word)
  );

  eas_ram #(.WORDS(WORDS), .WIDTH(RG_BITS)) u_m2 (
    .clk, .we(wr), .waddr(ac), .wdata(rg2), .raddr(ac), .rdata(m2_word)
  );

  // Oldest sample of a word is in its MSB.
  assign rd_data   = {m1_word[LAST_BIT - rd_bit], m2_word[LAST_BIT - rd_bit]};
  assign frame_pos = {c4_count, phase};

  // Reading and writing never overlap: the control unit only passes read pulses while
  // the key is closed and the last frame has been written.
  a_no_rw_overlap : assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd_step));

endmodule
