// sine_rom_tb: reads every word of the quarter-wave table and compares it
// with round((2^11 - 1) * sin(pi/2 * (i + 0.5) / 1024)), one clock after the
// address is applied.  Also checks that the table rises monotonically.
module sine_rom_tb;
  localparam int unsigned ADDR_W = 10, DATA_W = 11;
  localparam real PI = 3.14159265358979323846;

  logic              clk = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] data;
  int expected, prev;
  int checks = 0, failures = 0;

  sine_rom #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = -1;
    for (int i = 0; i < (1 << ADDR_W); i++) begin
      addr = ADDR_W'(i);
      @(posedge clk); #1;
      expected = $rtoi(2047.0 * $sin(PI / 2.0 * (real'(i) + 0.5) / 1024.0) + 0.5);
      checks++;
      if (int'(data) != expected) begin
        failures++;
        $display("FAIL addr %0d: %0d expected %0d", i, data, expected);
      end
      checks++;
      if (int'(data) < prev) begin
        failures++;
        $display("FAIL not monotonic at %0d", i);
      end
      prev = int'(data);
    end
    // Synchronous read: a new address shows only after the edge.
    addr = '0; @(posedge clk); #1;
    addr = '1; #1;
    checks++;
    if (int'(data) != 2) begin failures++; $display("FAIL read is not registered: %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
