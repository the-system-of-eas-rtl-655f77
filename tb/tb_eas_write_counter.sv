// Testbench of eas_write_counter (C4): the write pulse comes exactly one cycle after
// every fourth step, and the count follows the steps modulo 4.
module tb_eas_write_counter;
  logic clk = 0, rst_n = 0, step = 0;
  logic [1:0] count;
  logic wr;
  int model_cnt, model_wr, writes;
  int checks = 0, failures = 0;

  eas_write_counter #(.BITS(4)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_cnt = 0; model_wr = 0; writes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      step = 1'($urandom);
      @(posedge clk);
      model_wr = (step && model_cnt == 3) ? 1 : 0;
      if (step) model_cnt = (model_cnt + 1) % 4;
      #1;
      checks++;
      if (int'(count) != model_cnt || int'(wr) != model_wr) begin
        failures++;
        $display("cycle %0d: count=%0d wr=%b expected %0d %0d", n, count, wr, model_cnt, model_wr);
      end
      writes += model_wr;
    end
    checks++;
    if (writes < 50) begin
      failures++;
      $display("too few write pulses: %0d", writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
