// Control unit of one crate of time channels.
//
// It hands the memory blocks the generator pulses through keys, and runs the control
// trigger CT that decides when recording stops and starts again.
//
// How it works:
//  * Recording (CT "start"): the key K is open, so every clk cycle is a fast sample
//    (fast_run), and the key KS passes every 1 MHz pulse from the divider C100
//    (slow_tick). The 100 MHz generator is one pulse per two clk cycles; C100 counts
//    SLOW_DIV of them.
//  * Fast master: CT goes to "stop". Counter C64 is loaded and keeps K open for
//    POST_FAST more fast cells; counter C64S keeps KS open for POST_SLOW more slow cells.
//    A window timer of MAIN_WINDOW cycles starts. The frame position of the master
//    sample is latched into trig_phase.
//  * Main master during the window: the event is kept (key K2). When both counts are
//    done CT holds in "stop" (locked) and passes the computer's address switching
//    pulses to the address counters (rd_step) until the record permit pulse returns CT
//    to "start".
//  * No main master within the window: the counts are dropped and recording resumes.
//
// Timing: a fast master in cycle t leaves fast_run high in cycles t+1 .. t+POST_FAST and
// low from t+POST_FAST+1. slow_tick is a one-cycle pulse every 2*SLOW_DIV cycles.
// locked rises the cycle after both counts are done; rd_step = rd_pulse & locked.
//
// From the document: the 100 MHz generator and its key, CT with start/stop, C64, C64S,
// the 1 MHz division, the main master holding CT until the computer's record permit, and
// that recording starts again when no main master comes. This design's choices: the
// window in which a main master must come and its length, the trig_phase output and the
// single-clock form.
module eas_control_unit #(
  parameter int unsigned POST_FAST   = eas_pkg::POST_FAST,
  parameter int unsigned POST_SLOW   = eas_pkg::POST_SLOW,
  parameter int unsigned SLOW_DIV    = eas_pkg::SLOW_DIV,
  parameter int unsigned MAIN_WINDOW = 400
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fast_master,
  input  logic       main_master,
  input  logic       record_permit,
  input  logic       rd_pulse,
  input  logic [2:0] frame_pos,
  output logic       fast_run,
  output logic       slow_tick,
  output logic       slow_run,
  output logic       rd_step,
  output logic       locked,
  output logic [2:0] trig_phase
);

  eas_pkg::ct_state_e state;
  logic      gen_phase;     // 100 MHz generator: one pulse per two clk cycles
  logic      div_tick;      // 1 MHz pulse from C100, before key KS
  logic      c64_active, c64s_active, win_active;
  logic      main_seen;
  logic      start_post, abort;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gen_phase <= 1'b0;
    else        gen_phase <= ~gen_phase;
  end

  eas_clock_divider #(.DIV(SLOW_DIV)) u_c100 (
    .clk, .rst_n, .en(gen_phase), .tick(div_tick)
  );

  assign start_post = (state == eas_pkg::CT_RECORD) && fast_master;
  assign abort      = (state == eas_pkg::CT_POST) && !win_active && !main_seen && !main_master;

  eas_post_counter #(.COUNT(POST_FAST)) u_c64 (
    .clk, .rst_n, .load(start_post), .clear(abort), .step(fast_run), .active(c64_active)
  );

  eas_post_counter #(.COUNT(POST_SLOW)) u_c64s (
    .clk, .rst_n, .load(start_post), .clear(abort), .step(slow_tick), .active(c64s_active)
  );

  eas_post_counter #(.COUNT(MAIN_WINDOW)) u_window (
    .clk, .rst_n, .load(start_post), .clear(1'b0), .step(1'b1), .active(win_active)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= eas_pkg::CT_RECORD;
      main_seen  <= 1'b0;
      trig_phase <= '0;
    end else begin
      unique case (state)
        eas_pkg::CT_RECORD: begin
          main_seen <= 1'b0;
          if (fast_master) begin
            state      <= eas_pkg::CT_POST;
            trig_phase <= frame_pos;
          end
        end
        eas_pkg::CT_POST: begin
          if (main_master && win_active) main_seen <= 1'b1;
          if (abort)
            state <= eas_pkg::CT_RECORD;
          else if (main_seen && !c64_active && !c64s_active)
            state <= eas_pkg::CT_HOLD;
        end
        eas_pkg::CT_HOLD: begin
          if (record_permit) state <= eas_pkg::CT_RECORD;
        end
        default: state <= eas_pkg::CT_RECORD;
      endcase
    end
  end

  // Keys K and KS: open while recording, and while the post-trigger counters run.
  assign fast_run  = (state == eas_pkg::CT_RECORD) || (state == eas_pkg::CT_POST && c64_active);
  assign slow_run  = (state == eas_pkg::CT_RECORD) || (state == eas_pkg::CT_POST && c64s_active);
  assign slow_tick = div_tick && slow_run;
  assign locked    = (state == eas_pkg::CT_HOLD);
  assign rd_step   = rd_pulse && locked;

endmodule
