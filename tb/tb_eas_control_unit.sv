// Testbench of eas_control_unit: keys, post-trigger counts, main-master hold, readout
// gating and resumption, all at the default sizes (64 fast cells, 64 slow cells, 1 us).
//
// Checked: the 1 MHz pulse every 200 cycles; fast_run high for exactly 64 cycles after the
// fast master; 64 slow pulses after it; locked once both are done when a main master came;
// read pulses passed only while locked; trig_phase = frame_pos at the master; record
// permit reopens the keys; without a main master the keys reopen after the window, and a
// late main master does not hold the event.
module tb_eas_control_unit;
  localparam int WINDOW = 400;
  logic clk = 0, rst_n = 0;
  logic fast_master = 0, main_master = 0, record_permit = 0, rd_pulse = 0;
  logic [2:0] frame_pos = 0;
  logic fast_run, slow_tick, slow_run, rd_step, locked;
  logic [2:0] trig_phase;
  int checks = 0, failures = 0;
  int cyc = 0;

  eas_control_unit #(.MAIN_WINDOW(WINDOW)) dut (.*);

  always #2.5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  // Sends a fast master in the next cycle and returns after it was sampled.
  task automatic send_master(input logic [2:0] fp);
    @(negedge clk); fast_master = 1; frame_pos = fp;
    @(negedge clk); fast_master = 0; frame_pos = 3'($urandom);
  endtask

  initial begin
    int last_tick, fast_cycles, slow_ticks, t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    #1 check(fast_run && slow_run && !locked, "keys open after reset");

    // 1 MHz period
    last_tick = -1;
    repeat (1000) begin
      @(negedge clk);
      rd_pulse = 1'($urandom);
      check(!rd_step, "read pulse passed while recording");
      if (slow_tick) begin
        if (last_tick >= 0) check(cyc - last_tick == 200, "slow pulse period not 200 cycles");
        last_tick = cyc;
      end
    end
    rd_pulse = 0;

    // ---- event with a main master ----
    send_master(3'd5);
    check(trig_phase == 3'd5, "trig_phase not latched");
    fast_cycles = 1; slow_ticks = 0;     // the cycle after the master has already been sampled
    t0 = cyc;
    main_master = 1;
    @(negedge clk); main_master = 0;
    fast_cycles += fast_run;
    slow_ticks  += slow_tick;
    while (!locked && cyc - t0 < 20000) begin
      @(negedge clk);
      fast_cycles += fast_run;
      slow_ticks  += slow_tick;
      rd_pulse = 1'($urandom);
      check(!rd_step || locked, "read pulse passed before lock");
    end
    check(fast_cycles == 64, $sformatf("fast key open for %0d cycles, expected 64", fast_cycles));
    check(slow_ticks == 64, $sformatf("%0d slow pulses after master, expected 64", slow_ticks));
    check(locked, "not locked after main master");
    check(cyc - t0 >= 64 * 200 - 200 && cyc - t0 <= 64 * 200 + 2, "lock time not about 64 us");
    check(trig_phase == 3'd5, "trig_phase changed");
    // readout gating
    repeat (200) begin
      @(negedge clk);
      rd_pulse = 1'($urandom);
      fast_master = 1'($urandom);   // ignored while held
      #1 check(rd_step == rd_pulse, "read pulse not passed while locked");
      check(!fast_run && !slow_run && !slow_tick, "keys open while locked");
    end
    fast_master = 0; rd_pulse = 0;
    @(negedge clk); record_permit = 1;
    @(negedge clk); record_permit = 0;
    check(fast_run && slow_run && !locked, "record permit did not reopen the keys");

    // ---- event without a main master ----
    repeat (37) @(negedge clk);
    send_master(3'd2);
    t0 = cyc;
    while (!fast_run && cyc - t0 < 2000 || cyc - t0 < 70) @(negedge clk);
    check(cyc - t0 >= WINDOW - 2 && cyc - t0 <= WINDOW + 3,
          $sformatf("keys reopened %0d cycles after master, expected about %0d", cyc - t0, WINDOW));
    check(!locked && slow_run, "not recording after the window");

    // ---- main master too late ----
    send_master(3'd7);
    repeat (WINDOW + 5) @(negedge clk);
    main_master = 1;
    @(negedge clk); main_master = 0;
    repeat (64 * 200 + 400) begin
      @(negedge clk);
      check(!locked, "late main master held the event");
    end
    check(fast_run, "not recording after late main master");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
