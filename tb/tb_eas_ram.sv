// Testbench of eas_ram: random writes and reads against a reference array.
// The read port is asynchronous, so a word written on one edge is visible right after it.
module tb_eas_ram;
  localparam int WORDS = 16, WIDTH = 4;
  logic clk = 0, we;
  logic [3:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  eas_ram #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // Fill every word first.
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = 4'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 4'($urandom); wdata = 4'($urandom); raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
