// Testbench of eas_memory_block: one detector's fast and slow memories together.
//
// The block gets the same keyed pulses it gets from the control unit: fast_run every
// cycle, a slow tick every TICK cycles (shortened from 200), then both keys close and 64
// read pulses read both memories at once. References: the fast memory holds the last
// 128 samples of whole 8-sample frames, the slow memory the last 128 tick intervals, each
// cell the OR of the hits in it. Several rounds stop at different points.
module tb_eas_memory_block;
  localparam int CELLS = 128, TICK = 10;
  logic clk = 0, rst_n = 0, hit = 0, fast_run = 0, slow_tick = 0, slow_run = 0, rd_step = 0;
  logic [2:0] frame_pos;
  logic [1:0] fast_data, slow_data;
  bit   fs [$];
  bit   ss [$];
  bit   acc;
  int   checks = 0, failures = 0;

  eas_memory_block dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic record(input int ncyc);
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      fast_run = 1; slow_run = 1;
      slow_tick = (c % TICK) == TICK - 1;
      hit = ($urandom % 17) == 0;
      @(posedge clk);
      fs.push_back(hit);
      if (slow_tick) begin ss.push_back(acc | hit); acc = 0; end
      else acc |= hit;
    end
    @(negedge clk); fast_run = 0; slow_run = 0; slow_tick = 0; hit = 0; acc = 0;
  endtask

  task automatic read_all();
    int ff, sf;
    ff = (fs.size() / 8) * 8 - CELLS;
    sf = ss.size() - CELLS;
    @(negedge clk);
    for (int p = 0; p < CELLS / 2; p++) begin
      @(negedge clk);
      checks++;
      if (fast_data !== {fs[ff + 2*p], fs[ff + 2*p + 1]}) begin
        failures++; $display("fast pulse %0d: got %b", p, fast_data);
      end
      checks++;
      if (slow_data !== {ss[sf + 2*p], ss[sf + 2*p + 1]}) begin
        failures++; $display("slow pulse %0d: got %b", p, slow_data);
      end
      rd_step = 1;
      @(negedge clk); rd_step = 0;
    end
  endtask

  initial begin
    acc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      record(CELLS * TICK + 13 * r + 3);
      checks++;
      if (int'(frame_pos) != fs.size() % 8) begin
        failures++; $display("frame_pos %0d expected %0d", frame_pos, fs.size() % 8);
      end
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
