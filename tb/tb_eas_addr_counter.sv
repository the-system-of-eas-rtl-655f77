// Testbench of eas_addr_counter: random increments, including wrap-around from 15 to 0.
module tb_eas_addr_counter;
  logic clk = 0, rst_n = 0, inc = 0;
  logic [3:0] addr;
  int model, wraps;
  int checks = 0, failures = 0;

  eas_addr_counter #(.AW(4)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0; wraps = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      inc = 1'($urandom);
      @(posedge clk);
      if (inc) begin
        model = (model + 1) % 16;
        if (model == 0) wraps++;
      end
      #1;
      checks++;
      if (int'(addr) != model) begin
        failures++;
        $display("cycle %0d: addr=%0d expected %0d", n, addr, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
