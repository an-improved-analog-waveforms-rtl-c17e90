// wave_shaper_tb: drives random phases, waveform selections and duty words
// and compares every sample, three clocks later, with the waveform computed
// from its definition.  Each waveform must be seen, and the square wave with
// several duty cycles.
module wave_shaper_tb;
  import dds_pkg::*;
  import dds_ref_pkg::*;
  localparam int unsigned PHASE_W = 12, AMP_W = 12, LAT = 3;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic [PHASE_W-1:0]      phase, duty;
  wave_sel_e               wave_sel;
  logic signed [AMP_W-1:0] sample;
  int exp_q[$];
  int sel_seen[4];
  int checks = 0, failures = 0;

  wave_shaper #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .wave_sel(wave_sel), .duty(duty), .sample(sample));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; phase = '0; duty = '0; wave_sel = WAVE_SINE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // LAT counts edges, the capturing one included: after the edge of step
    // i the sample reflects the inputs of step i - (LAT - 1).
    for (int i = 0; i < 8000; i++) begin
      int unsigned p, s, d;
      p = $urandom_range(0, (1 << PHASE_W) - 1);
      // Hold each waveform for a run of samples, then switch.
      s = (i / 250) % 4;
      d = (i / 1000) * 512;
      phase = PHASE_W'(p); wave_sel = wave_sel_e'(s); duty = PHASE_W'(d);
      exp_q.push_back(wave_ref(p, s, d, PHASE_W, AMP_W));
      sel_seen[s]++;
      @(posedge clk); #1;
      if (i >= LAT - 1) begin
        checks++;
        if (int'(sample) != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d: sample %0d expected %0d", i, sample, exp_q[0]);
        end
      end
      if (i >= LAT - 1) void'(exp_q.pop_front());
    end
    // Directed: every phase through the square wave at several duty words,
    // so both sides of each duty edge are seen; then a full sawtooth ramp.
    for (int i = 0; i < 5 * (1 << PHASE_W); i++) begin
      int unsigned p, s, d;
      p = i % (1 << PHASE_W);
      s = (i < 4 * (1 << PHASE_W)) ? 2 : 3;
      case (i / (1 << PHASE_W))
        0: d = 1;
        1: d = 1024;
        2: d = 2048;
        default: d = (1 << PHASE_W) - 1;
      endcase
      phase = PHASE_W'(p); wave_sel = wave_sel_e'(s); duty = PHASE_W'(d);
      exp_q.push_back(wave_ref(p, s, d, PHASE_W, AMP_W));
      @(posedge clk); #1;
      checks++;
      if (int'(sample) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL sweep %0d: sample %0d expected %0d", i, sample, exp_q[0]);
      end
      void'(exp_q.pop_front());
    end
    foreach (sel_seen[k]) begin
      checks++;
      if (sel_seen[k] == 0) begin failures++; $display("FAIL waveform %0d never selected", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
