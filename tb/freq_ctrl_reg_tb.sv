// freq_ctrl_reg_tb: checks that the frequency control register clears on
// reset, takes a word one clock after a write strobe and holds it otherwise.
module freq_ctrl_reg_tb;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst_n, we;
  logic [W-1:0] din, fcr, expected;
  int checks = 0, failures = 0;

  freq_ctrl_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .we(we), .din(din), .fcr(fcr));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (fcr !== expected) begin
      failures++;
      $display("FAIL %s: fcr=%h expected %h", what, fcr, expected);
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b1; din = 32'hDEAD_BEEF;
    @(posedge clk); #1;
    expected = '0; check("reset");
    rst_n = 1'b1; we = 1'b0;
    @(posedge clk); #1;
    check("no write after reset");
    for (int i = 0; i < 500; i++) begin
      we  = ($urandom_range(0, 2) == 0);
      din = $urandom();
      if (i == 250) begin we = 1'b1; din = 32'd21475; end
      @(posedge clk); #1;
      if (we) expected = din;
      check("write/hold");
    end
    rst_n = 1'b0; @(posedge clk); #1;
    expected = '0; check("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
