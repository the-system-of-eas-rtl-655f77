// Testbench of eas_slow_channel: the 128-cell ring of 1 us cells.
//
// Ticks come every TICK cycles (shortened from 200 to keep the run short; the channel
// only sees the tick pulse). A reference ORs the hits of each tick interval into one
// cell; hits while run is low are dropped. After run falls, 64 read pulses must return
// the last 128 cells two per pulse, oldest first, for both an even and an odd number of
// cells written (the two RAM banks swap roles), and a second readout must repeat it.
module tb_eas_slow_channel;
  localparam int CELLS = 128, TICK = 9;
  logic clk = 0, rst_n = 0, hit = 0, tick = 0, run = 0, rd_step = 0;
  logic [1:0] rd_data;
  bit   cells [$];
  bit   acc;
  int   checks = 0, failures = 0;

  eas_slow_channel dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic record(input int ncells);
    for (int k = 0; k < ncells; k++) begin
      for (int c = 0; c < TICK; c++) begin
        @(negedge clk);
        run = 1; tick = (c == TICK - 1); hit = ($urandom % 23) == 0;
        @(posedge clk);
        if (tick) begin cells.push_back(acc | hit); acc = 0; end
        else acc |= hit;
      end
    end
    // key closed: hits are ignored and the latch is cleared
    for (int c = 0; c < 5; c++) begin
      @(negedge clk); run = 0; tick = 0; hit = 1;
    end
    @(negedge clk); hit = 0;
    acc = 0;
  endtask

  task automatic read_all(input int pass);
    int first;
    first = cells.size() - CELLS;
    for (int p = 0; p < CELLS / 2; p++) begin
      @(negedge clk);
      checks++;
      if (rd_data[1] !== cells[first + 2*p] || rd_data[0] !== cells[first + 2*p + 1]) begin
        failures++;
        $display("pass %0d pulse %0d (written %0d): got %b expected %b%b", pass, p,
                 cells.size(), rd_data, cells[first + 2*p], cells[first + 2*p + 1]);
      end
      rd_step = 1;
      @(negedge clk); rd_step = 0;
    end
  endtask

  initial begin
    acc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    record(CELLS + 20);
    read_all(0);
    read_all(1);
    record(65);             // odd total: readout starts in the odd bank
    read_all(2);
    read_all(3);
    record(130);
    read_all(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
