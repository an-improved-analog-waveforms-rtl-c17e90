// dac_model_tb: checks the converter's transfer function
// vout = VREF * code / 2048 at full scale, zero and random codes, and that
// the output changes only on a clock edge and then holds.
module dac_model_tb;
  localparam int unsigned AMP_W = 12;
  localparam real VREF = 2.5;

  logic                    clk = 1'b0;
  logic signed [AMP_W-1:0] code;
  real                     vout, expected, held;
  int checks = 0, failures = 0;

  dac_model #(.AMP_W(AMP_W), .VREF(VREF)) dut (.clk(clk), .code(code), .vout(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(real want);
    checks++;
    if (vout > want + 1.0e-9 || vout < want - 1.0e-9) begin
      failures++;
      $display("FAIL code %0d: vout %f expected %f", code, vout, want);
    end
  endtask

  initial begin
    code = 12'sd2047;  @(posedge clk); #1; check(2.5 * 2047.0 / 2048.0);
    code = -12'sd2047; @(posedge clk); #1; check(-2.5 * 2047.0 / 2048.0);
    code = -12'sd2048; @(posedge clk); #1; check(-2.5);
    code = 12'sd0;     @(posedge clk); #1; check(0.0);
    for (int i = 0; i < 1000; i++) begin
      int c;
      c = $urandom_range(0, 4095) - 2048;
      code = AMP_W'(c);
      @(posedge clk); #1;
      expected = 2.5 * real'(c) / 2048.0;
      check(expected);
      // Zero-order hold: a new code between edges leaves the output alone.
      held = vout;
      code = ~code;
      #2;
      check(held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
