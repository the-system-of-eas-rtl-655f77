// Testbench of eas_fast_channel: the 128-cell ring of 5 ns cells.
//
// A reference keeps every sample taken while run is high. Only whole 8-sample frames
// reach the RAMs, so after run falls the memory must hold the last 128 samples of the
// last complete frame. 64 read pulses must return them two per pulse, oldest first, and
// a second 64 pulses must return the same again (the address counter is back where it
// started). Recording then resumes; samples left in the registers must continue the
// stream. Rounds stop at every frame position. The write rate is checked too: one
// write per 8 recorded samples (25 MHz per register at a 200 MHz sample rate).
module tb_eas_fast_channel;
  localparam int CELLS = 128;
  logic clk = 0, rst_n = 0, hit = 0, run = 0, rd_step = 0;
  logic [2:0] frame_pos;
  logic [1:0] rd_data;
  bit   stream [$];
  int checks = 0, failures = 0;
  int writes;

  eas_fast_channel dut (.*);

  always #2.5 clk = ~clk;

  always @(posedge clk) if (rst_n && dut.wr) writes++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic record(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      run = 1; hit = ($urandom % 5) == 0;
      checks++;
      if (int'(frame_pos) != stream.size() % 8) begin
        failures++; $display("frame_pos %0d, expected %0d", frame_pos, stream.size() % 8);
      end
      @(posedge clk);
      stream.push_back(hit);
    end
    @(negedge clk); run = 0; hit = 0;
  endtask

  task automatic read_all(input int pass);
    int last_written, first;
    last_written = (stream.size() / 8) * 8;   // samples that reached the RAMs
    first = last_written - CELLS;
    @(negedge clk);                            // let the last write land
    for (int p = 0; p < CELLS / 2; p++) begin
      @(negedge clk);
      checks++;
      if (rd_data[1] !== stream[first + 2*p] || rd_data[0] !== stream[first + 2*p + 1]) begin
        failures++;
        $display("pass %0d pulse %0d: got %b expected %b%b", pass, p, rd_data,
                 stream[first + 2*p], stream[first + 2*p + 1]);
      end
      rd_step = 1;
      @(negedge clk); rd_step = 0;
    end
  endtask

  initial begin
    int n_before;
    writes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    record(300);                               // more than one lap of the ring
    for (int round = 0; round < 10; round++) begin
      record(150 + round + $urandom % 7);      // stop at varied frame positions
      read_all(0);
      read_all(1);
    end
    // write rate: every 8 samples one write
    n_before = writes;
    record(800);
    @(negedge clk);
    checks++;
    if (writes - n_before < 99 || writes - n_before > 101) begin
      failures++; $display("writes in 800 samples: %0d, expected 100", writes - n_before);
    end
    read_all(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
