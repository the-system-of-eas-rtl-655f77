// Testbench of eas_phase_inverter: the two enables must alternate strictly over the
// cycles where run is high, start with ph_a after reset, and never be high together.
module tb_eas_phase_inverter;
  logic clk = 0, rst_n = 0, run = 0;
  logic ph_a, ph_b, phase;
  logic expect_b;
  int checks = 0, failures = 0;

  eas_phase_inverter dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      run = ($urandom % 4) != 0;
      #1;
      checks++;
      if (ph_a !== (run && !expect_b) || ph_b !== (run && expect_b) || phase !== expect_b) begin
        failures++;
        $display("cycle %0d: run=%b ph_a=%b ph_b=%b expected phase %b", n, run, ph_a, ph_b, expect_b);
      end
      @(posedge clk);
      if (run) expect_b = !expect_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
