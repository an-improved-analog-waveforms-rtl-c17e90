// lpf_model_tb: checks the reconstruction filter model.  The step response
// must follow 1 - (1 - a)^n with a = 1 - exp(-2*pi*fc/fs); a low tone must
// pass with its amplitude, and a tone well above the corner must be
// attenuated as the first-order response predicts.
module lpf_model_tb;
  localparam real FS = 100.0e6, FC = 5.0e6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  real  vin, vout, a, want, peak;
  int checks = 0, failures = 0;

  lpf_model #(.FS_HZ(FS), .FC_HZ(FC)) dut (.clk(clk), .vin(vin), .vout(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Peak output for a sampled sine of the given period, after settling.
  task automatic tone(int period, output real pk);
    pk = 0.0;
    for (int n = 0; n < 40 * period; n++) begin
      vin = $sin(2.0 * PI * real'(n) / real'(period));
      @(posedge clk); #1;
      if (n >= 20 * period && vout > pk) pk = vout;
    end
  endtask

  initial begin
    a = 1.0 - $exp(-2.0 * PI * FC / FS);
    vin = 0.0;
    repeat (200) @(posedge clk);
    #1;
    checks++;
    if (vout > 1.0e-9 || vout < -1.0e-9) begin failures++; $display("FAIL not at rest"); end
    vin = 1.0;
    for (int n = 1; n <= 60; n++) begin
      @(posedge clk); #1;
      want = 1.0 - (1.0 - a) ** n;
      checks++;
      if (vout > want + 1.0e-9 || vout < want - 1.0e-9) begin
        failures++; $display("FAIL step n=%0d: %f expected %f", n, vout, want);
      end
    end
    // 100 kHz (period 1000): within 1 % of the input amplitude.
    tone(1000, peak);
    checks++;
    if (peak < 0.99 || peak > 1.001) begin failures++; $display("FAIL passband peak %f", peak); end
    // 25 MHz (period 4): far above the corner; first order gives ~0.33.
    tone(4, peak);
    checks++;
    if (peak > 0.5 || peak < 0.15) begin failures++; $display("FAIL stopband peak %f", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
