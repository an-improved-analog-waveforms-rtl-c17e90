// phase_adder_tb: checks that the registered table address is the top
// PHASE_W bits of (acc + P) mod 2^32, one clock after the inputs.
module phase_adder_tb;
  localparam int unsigned ACC_W = 32, PHASE_W = 12;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [ACC_W-1:0]   acc, pword;
  logic [PHASE_W-1:0] phase;
  longint unsigned    s;
  int unsigned        expected;
  int checks = 0, failures = 0;

  phase_adder #(.ACC_W(ACC_W), .PHASE_W(PHASE_W)) dut (
    .clk(clk), .rst_n(rst_n), .acc(acc), .pword(pword), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; acc = 32'hFFFF_FFFF; pword = 32'hFFFF_FFFF;
    @(posedge clk); #1;
    checks++;
    if (phase !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      acc   = $urandom();
      pword = (i < 10) ? 32'hC000_0000 : $urandom();  // first few: wrapping sum
      s = (longint'(acc) + longint'(pword)) % (64'd1 << ACC_W);
      expected = int'(s / (64'd1 << (ACC_W - PHASE_W)));
      checks++;
      @(posedge clk); #1;
      if (phase !== PHASE_W'(expected)) begin
        failures++;
        $display("FAIL acc=%h P=%h phase=%h expected %h", acc, pword, phase, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
