// Testbench of eas_post_counter (C64): after a load it stays active for exactly COUNT
// steps, however the steps are spread; clear ends it at once.
module tb_eas_post_counter;
  localparam int COUNT = 64;
  logic clk = 0, rst_n = 0, load = 0, clear = 0, step = 0;
  logic active;
  int checks = 0, failures = 0;

  eas_post_counter #(.COUNT(COUNT)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  initial begin
    int steps;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(active, 0, "after reset");
    for (int round = 0; round < 10; round++) begin
      @(negedge clk); load = 1; step = 1;   // load wins over a step in the same cycle
      @(negedge clk); load = 0;
      check(active, 1, "right after load");
      steps = 0;
      while (steps < COUNT) begin
        step = ($urandom % 3) != 0;
        @(posedge clk); if (step) steps++;
        #1 check(active, steps < COUNT, "during count");
        @(negedge clk);
      end
      step = 1;
      repeat (3) begin @(posedge clk); #1 check(active, 0, "after count"); end
      step = 0;
    end
    // clear during a count
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; step = 1;
    repeat (5) @(negedge clk);
    clear = 1;
    @(negedge clk); clear = 0;
    check(active, 0, "after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
