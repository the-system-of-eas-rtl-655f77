// Testbench of eas_clock_divider (C100): with the enable high every other cycle, as from
// the 100 MHz generator on the 200 MHz clock, the tick must come every 200 cycles (1 us),
// one cycle long. Also checks a run with a randomly gated enable: one tick per 100 enables.
module tb_eas_clock_divider;
  logic clk = 0, rst_n = 0, en = 0;
  logic tick;
  int checks = 0, failures = 0;
  int last_tick, ticks, ens;

  eas_clock_divider #(.DIV(100)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_tick = -1; ticks = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      en = c[0];
      #1;
      if (tick) begin
        checks++;
        if (!en) begin failures++; $display("tick without enable at %0d", c); end
        if (last_tick >= 0 && c - last_tick != 200) begin
          failures++; $display("tick period %0d, expected 200", c - last_tick);
        end
        last_tick = c; ticks++;
      end
    end
    checks++;
    if (ticks != 20) begin failures++; $display("ticks=%0d expected 20", ticks); end
    // random enable: tick on every 100th enable
    ens = 0;
    while (ens < 100 * 3 + 50) begin
      @(negedge clk);
      en = 1'($urandom);
      #1;
      if (en) ens++;
      if (tick) begin
        checks++;
        if (ens % 100 != 0) begin failures++; $display("tick at enable %0d", ens); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
