// Slow memory MS of one time channel: a ring of CELLS cells of 1 us each.
//
// How it works: a hit latch remembers whether the detector fired at any time since the
// last 1 MHz pulse. Each tick (the keyed 1 MHz pulse from the control unit) writes the
// latch into the cell at the address counter and clears it, and the counter advances, so
// the memory holds the last CELLS microseconds with one bit per microsecond. The cells
// are kept in two one-bit RAM banks, even cells and odd cells, in the same way as M1 and
// M2 of the fast memory, so one readout pulse reads two successive cells and the same 64
// pulses read the whole ring. While the key KS is closed (run low) the latch is held
// clear.
//
// Reading: the address is {word counter, bank bit}. rd_data = {older, newer} of the two
// cells at the current address, valid in the same cycle; rd_step advances the address by
// two cells. After recording stops the address points at the oldest cell, so the first
// position is the most remote moment in time.
//
// From the document: 1 us cells, recording without shift registers, its own address
// counter driven by 1 MHz pulses, +-64 us around the master with 128 cells. This design's
// choices: the hit latch, the even/odd bank split and the two-cell readout.
module eas_slow_channel #(
  parameter int unsigned CELLS = eas_pkg::SLOW_CELLS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hit,
  input  logic       tick,
  input  logic       run,
  input  logic       rd_step,
  output logic [1:0] rd_data
);

  localparam int unsigned WORDS = CELLS / 2;
  localparam int unsigned WAW   = $clog2(WORDS);

  logic           seen;
  logic           bank;
  logic [WAW-1:0] word;
  logic           cell_bit;
  logic           b0_q, b1_q;
  logic [WAW-1:0] b0_raddr;

  assign cell_bit = seen | hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               seen <= 1'b0;
    else if (!run || tick)    seen <= 1'b0;
    else if (hit)             seen <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bank <= 1'b0;
    else if (tick) bank <= ~bank;
  end

  // Word counter: one step per two written cells, one step per read pulse.
  eas_addr_counter #(.AW(WAW)) u_ac (
    .clk, .rst_n, .inc((tick && bank) || rd_step), .addr(word)
  );

  eas_ram #(.WORDS(WORDS), .WIDTH(1)) u_ms_even (
    .clk, .we(tick && !bank), .waddr(word), .wdata(cell_bit),
    .raddr(b0_raddr), .rdata(b0_q)
  );

  eas_ram #(.WORDS(WORDS), .WIDTH(1)) u_ms_odd (
    .clk, .we(tick && bank), .waddr(word), .wdata(cell_bit),
    .raddr(word), .rdata(b1_q)
  );

  // Cells s and s+1 with s = {word, bank}: if s is odd, its successor is in the next
  // word of the even bank.
  assign b0_raddr = word + WAW'(bank);
  assign rd_data  = bank ? {b1_q, b0_q} : {b0_q, b1_q};

  a_no_rw_overlap : assert property (@(posedge clk) disable iff (!rst_n) !(tick && rd_step));

endmodule
