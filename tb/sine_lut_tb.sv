// sine_lut_tb: sweeps all 4096 phases through the quarter-wave folding and
// compares each sample, two clocks later, with the full-wave sine computed
// in floating point.  Counts samples from every quadrant, so both the
// address flip and the sign flip are exercised.
module sine_lut_tb;
  import dds_ref_pkg::*;
  localparam int unsigned PHASE_W = 12, AMP_W = 12, LAT = 2;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic [PHASE_W-1:0]      phase;
  logic signed [AMP_W-1:0] sample;
  int exp_q[$];
  int quadrant_seen[4];
  int checks = 0, failures = 0;

  sine_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .sample(sample));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; phase = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // The table is read with phase 0 during reset; LAT = 2 edges, so one
    // sample is already in flight when the sweep starts.
    for (int i = 0; i < LAT - 1; i++) exp_q.push_back(sine_ref(0, PHASE_W, AMP_W));
    // Sequential sweep, then random phases.
    for (int i = 0; i < (1 << PHASE_W) + 2000; i++) begin
      int unsigned p;
      p = (i < (1 << PHASE_W)) ? i : $urandom_range(0, (1 << PHASE_W) - 1);
      phase = PHASE_W'(p);
      exp_q.push_back(sine_ref(p, PHASE_W, AMP_W));
      quadrant_seen[p >> (PHASE_W - 2)]++;
      @(posedge clk); #1;
      checks++;
      if (int'(sample) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: sample %0d expected %0d", i, sample, exp_q[0]);
      end
      void'(exp_q.pop_front());
    end
    foreach (quadrant_seen[q]) begin
      checks++;
      if (quadrant_seen[q] == 0) begin failures++; $display("FAIL quadrant %0d not seen", q); end
    end
    // Known points: peak near 90 degrees, trough near 270 degrees.
    checks++;
    if (sine_ref(1023, PHASE_W, AMP_W) != 2047 || sine_ref(3071, PHASE_W, AMP_W) != -2047) begin
      failures++; $display("FAIL reference peaks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
