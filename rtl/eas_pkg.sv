// Shared constants and types of the EAS time-analysis recorder.
//
// The recorder keeps, per detector, a 128-cell ring of 5 ns cells (fast memory) and a
// 128-cell ring of 1 us cells (slow memory). Fast cells are collected in frames of
// 8 samples: two 4-bit shift registers, one per half period of the 100 MHz generator,
// are written together into two 16-word RAMs. The numbers below are the reference
// configuration; the modules take them as parameter defaults.
package eas_pkg;

  // Fast memory: 16 words x 4 bits per RAM, two RAMs -> 128 cells of 5 ns.
  localparam int unsigned FAST_WORDS = 16;
  localparam int unsigned RG_BITS    = 4;

  // Slow memory: 128 cells of 1 us.
  localparam int unsigned SLOW_CELLS = 128;

  // Cells recorded after the fast master before the keys close.
  localparam int unsigned POST_FAST = 64;
  localparam int unsigned POST_SLOW = 64;

  // 100 MHz generator pulses per 1 us slow cell.
  localparam int unsigned SLOW_DIV = 100;

  // States of the control trigger CT.
  typedef enum logic [1:0] {
    CT_RECORD = 2'd0,  // "start": keys open, rings recording continuously
    CT_POST   = 2'd1,  // fast master seen: counting out the post-trigger cells
    CT_HOLD   = 2'd2   // "stop" held by the main master until record permit
  } ct_state_e;

endpackage
