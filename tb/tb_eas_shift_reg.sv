// Testbench of eas_shift_reg: random shift enables and data against a reference model.
module tb_eas_shift_reg;
  logic clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [3:0] q, model;
  int checks = 0, failures = 0;

  eas_shift_reg #(.BITS(4)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      shift = 1'($urandom); din = 1'($urandom);
      @(posedge clk);
      if (shift) model = {model[2:0], din};
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
