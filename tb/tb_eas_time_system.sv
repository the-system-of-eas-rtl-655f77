// End-to-end testbench of eas_time_system at its default sizes: four detectors, 128 fast
// cells of 5 ns, 128 slow cells of 1 us, 64-cell post-trigger counts, 64-pulse readout.
//
// The detectors fire at random; the computer side of the test sends masters, reads the
// held event with 64 pulses and sends the record permit, and toggles the read pulse at
// random while recording (it must have no effect). A monitor keeps, per channel, every
// fast sample and every slow cell as the recorder should have taken them, together with
// the cycle of each. Each readout is compared with the reference, and the cycle of every
// fast and slow cell is compared with the time the top-level description gives it from
// the pulse number and trig_phase. Every mechanism is counted and must occur: ring
// wrap-around of both memories, fast and slow freeze after the master, hold by the main
// master, resumption without a main master, a late main master ignored, partial frames
// left in the registers, readout, read pulses ignored while recording, record permit.
module tb_eas_time_system;
  localparam int NCH = 4, CELLS = 128, WINDOW = 400, US = 200;
  localparam int POST = CELLS / 2;   // cells after the master, fast and slow

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] hit = '0;
  logic fast_master = 0, main_master = 0, record_permit = 0, rd_pulse = 0;
  logic locked, fast_run, slow_run;
  logic [2:0] trig_phase;
  logic [NCH-1:0][1:0] fast_data, slow_data;

  eas_time_system dut (.*);

  // reference streams
  bit fs [NCH][$];
  bit ss [NCH][$];
  int fcyc [$];
  int scyc [$];
  bit acc [NCH];
  int cyc = 0;
  int km = 0;
  int rise_cyc = 0;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_wrap_fast = 0, n_wrap_slow = 0, n_fast_freeze = 0, n_slow_freeze = 0, n_hold = 0;
  int n_resume = 0, n_late_main = 0, n_partial = 0, n_readout = 0, n_rd_ignored = 0, n_permit = 0;
  logic fast_run_q = 1, slow_run_q = 1;

  always #2.5 clk = ~clk;

  initial begin
    repeat (300 * CELLS * US) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: what the memories must have recorded, sampled before each clock edge.
  always @(posedge clk) begin
    if (rst_n) begin
      if (fast_run) begin
        for (int ch = 0; ch < NCH; ch++) fs[ch].push_back(hit[ch]);
        fcyc.push_back(cyc);
      end
      if (dut.slow_tick) scyc.push_back(cyc);
      for (int ch = 0; ch < NCH; ch++) begin
        if (dut.slow_tick) begin ss[ch].push_back(acc[ch] | hit[ch]); acc[ch] = 0; end
        else if (!slow_run) acc[ch] = 0;
        else acc[ch] |= hit[ch];
      end
      if (fast_master && fast_run && !locked && dut.u_cu.state == eas_pkg::CT_RECORD) km = cyc;
      if (fast_run_q && !fast_run) n_fast_freeze++;
      if (!fast_run_q && fast_run) rise_cyc = cyc;
      if (slow_run_q && !slow_run) n_slow_freeze++;
      if (rd_pulse && !locked) n_rd_ignored++;
      fast_run_q = fast_run; slow_run_q = slow_run;
      cyc++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: %s", cyc, what); end
  endtask

  task automatic drive_random();
    for (int ch = 0; ch < NCH; ch++) hit[ch] = ($urandom % 8) == 0;
    rd_pulse = 1'($urandom);
  endtask

  task automatic record(input int ncyc);
    repeat (ncyc) begin @(negedge clk); drive_random(); end
  endtask

  // Fast master; optional main master `main_delay` cycles later (negative: none).
  task automatic event_start(input int main_delay);
    @(negedge clk); drive_random(); fast_master = 1;
    if (fs[0].size() > CELLS) n_wrap_fast++;
    if (ss[0].size() > CELLS) n_wrap_slow++;
    @(negedge clk); fast_master = 0; drive_random();
    if (main_delay >= 0) begin
      repeat (main_delay) begin @(negedge clk); drive_random(); end
      main_master = 1;
      @(negedge clk); main_master = 0; drive_random();
    end
  endtask

  task automatic readout();
    int ff, sf, pend, t;
    pend = (int'(trig_phase) + 1) % 8;
    if (pend != 0) n_partial++;
    ff = (fs[0].size() / 8) * 8 - CELLS;
    sf = ss[0].size() - CELLS;
    hit = '0; rd_pulse = 0;
    for (int p = 0; p < CELLS / 2; p++) begin
      @(negedge clk);
      for (int ch = 0; ch < NCH; ch++) begin
        check(fast_data[ch] == {fs[ch][ff + 2*p], fs[ch][ff + 2*p + 1]},
              $sformatf("ch %0d fast pulse %0d: got %b", ch, p, fast_data[ch]));
        check(slow_data[ch] == {ss[ch][sf + 2*p], ss[ch][sf + 2*p + 1]},
              $sformatf("ch %0d slow pulse %0d: got %b", ch, p, slow_data[ch]));
      end
      // time of the two fast cells from the pulse number alone
      for (int k = 0; k < 2; k++) begin
        t = km + 2*p + k - (POST - 1) - pend;
        check(fcyc[ff + 2*p + k] == t, $sformatf("fast cell %0d taken at %0d, expected %0d",
              2*p + k, fcyc[ff + 2*p + k], t));
      end
      rd_pulse = 1;
      @(negedge clk); rd_pulse = 0;
    end
    // the slow cell holding the master: number POST, or POST-1 if the master fell on a 1 MHz pulse
    if (scyc[sf + POST - 1] == km) check(1, "");
    else check(scyc[sf + POST - 1] < km && km <= scyc[sf + POST],
               $sformatf("master at %0d not in slow cell %0d", km, POST));
    check(scyc[sf + CELLS - 1] - scyc[sf] == (CELLS - 1) * US, "slow cells not 1 us apart");
    n_readout++;
  endtask

  task automatic held_event(input int main_delay);
    int t0;
    event_start(main_delay);
    t0 = cyc;
    while (!locked && cyc - t0 < (POST + 6) * US) begin
      @(negedge clk); drive_random();
      if (locked) rd_pulse = 0;   // the computer reads only a held event
    end
    check(locked, "event not held after main master");
    check(!fast_run && !slow_run, "keys open while held");
    check(fcyc[fcyc.size() - 1] == km + POST, "fast recording did not stop POST cells after master");
    check(scyc[scyc.size() - 1] - km > (POST - 1) * US && scyc[scyc.size() - 1] - km <= POST * US,
          "slow recording did not stop POST us after master");
    n_hold++;
    repeat (10) begin @(negedge clk); drive_random(); rd_pulse = 0; end
    readout();
    @(negedge clk); record_permit = 1;
    @(negedge clk); record_permit = 0;
    check(fast_run && slow_run && !locked, "record permit did not resume recording");
    n_permit++;
  endtask

  task automatic dropped_event(input int main_delay);
    int t0;
    event_start(main_delay);
    t0 = km;
    while (rise_cyc <= km && cyc - t0 < 2 * WINDOW) begin @(negedge clk); drive_random(); end
    check(fast_run && slow_run && !locked, "recording did not resume without main master");
    check(rise_cyc - t0 >= WINDOW - 3 && rise_cyc - t0 <= WINDOW + 3,
          $sformatf("resumed %0d cycles after the master, expected about %0d", rise_cyc - t0, WINDOW));
    if (main_delay >= 0) n_late_main++; else n_resume++;
  endtask

  initial begin
    for (int ch = 0; ch < NCH; ch++) acc[ch] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    record((CELLS + 2) * US + 17);           // both rings lapped
    held_event(3);
    record(2000);
    dropped_event(-1);
    record((CELLS + 3) * US + 5);
    held_event(WINDOW - 100);
    record(1000);
    dropped_event(WINDOW + 10);     // main master after the window
    for (int i = 0; i < 4; i++) begin
      record((CELLS + 1) * US + int'($urandom % 200));
      held_event(int'($urandom % 50));
    end
    check(n_wrap_fast > 0, "fast ring never wrapped");
    check(n_wrap_slow > 0, "slow ring never wrapped");
    check(n_fast_freeze > 0, "fast freeze never happened");
    check(n_slow_freeze > 0, "slow freeze never happened");
    check(n_hold > 0, "main master hold never happened");
    check(n_resume > 0, "resume without main master never happened");
    check(n_late_main > 0, "late main master never happened");
    check(n_partial > 0, "partial frame at freeze never happened");
    check(n_readout > 0, "readout never happened");
    check(n_rd_ignored > 0, "read pulse while recording never happened");
    check(n_permit > 0, "record permit never happened");
    $display("mechanisms: wrap_fast=%0d wrap_slow=%0d fast_freeze=%0d slow_freeze=%0d hold=%0d resume=%0d late_main=%0d partial_frame=%0d readout=%0d rd_ignored=%0d permit=%0d",
             n_wrap_fast, n_wrap_slow, n_fast_freeze, n_slow_freeze, n_hold, n_resume,
             n_late_main, n_partial, n_readout, n_rd_ignored, n_permit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
