// nco_tb: the oscillator against a cycle-accurate software model.
//
// The model keeps its own increment register, accumulator, phase register
// and waveform controls and computes each expected sample from the waveform
// definitions; every sample is compared.  On top of that the test measures:
// the output period for a tuning word of 2^32/64 (one wrap per 64 clocks),
// the 4-clock latency from the phase word to the sample, the 6-clock latency
// from the tuning word to the sample, and that a disabled oscillator holds
// its phase.
module nco_tb;
  import dds_pkg::*;
  import dds_ref_pkg::*;
  localparam int unsigned ACC_W = 32, PHASE_W = 12, AMP_W = 12;
  localparam int unsigned LAT = 3;  // phase register to sample, in edges

  logic                    clk = 1'b0;
  logic                    rst_n, en, wrap;
  logic [ACC_W-1:0]        fcr, pword;
  wave_sel_e               wave_sel;
  logic [PHASE_W-1:0]      duty, phase;
  logic signed [AMP_W-1:0] sample;

  longint unsigned m_inc, m_acc;
  int unsigned     m_phase, m_sel, m_duty;
  int              exp_q[$];
  int              settle;
  int checks = 0, failures = 0;
  int wraps = 0, cyc = 0, last_wrap = -1, period = 0;

  nco #(.ACC_W(ACC_W), .PHASE_W(PHASE_W), .AMP_W(AMP_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .fcr(fcr), .pword(pword), .wave_sel(wave_sel),
    .duty(duty), .phase(phase), .wrap(wrap), .sample(sample));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: update the model with the values the design samples, then
  // compare the sample once the edge has passed.
  task automatic step();
    @(posedge clk);
    cyc++;
    m_phase = int'(((m_acc + longint'(pword)) % (64'd1 << ACC_W)) >> (ACC_W - PHASE_W));
    if (en) m_acc = (m_acc + m_inc) % (64'd1 << ACC_W);
    m_inc  = 64'(fcr);
    m_sel  = int'(wave_sel);
    m_duty = int'(duty);
    exp_q.push_back(wave_ref(m_phase, m_sel, m_duty, PHASE_W, AMP_W));
    #1;
    if (wrap) begin
      wraps++;
      if (last_wrap >= 0) period = cyc - last_wrap;
      last_wrap = cyc;
    end
    if (exp_q.size() > LAT) begin
      if (settle > 0) settle--;
      else begin
        checks++;
        if (int'(sample) != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: sample %0d expected %0d", cyc, sample, exp_q[0]);
        end
      end
      void'(exp_q.pop_front());
    end
  endtask

  // Clocks until `sample` first differs from its present value.
  task automatic latency_to_change(output int n);
    logic signed [AMP_W-1:0] old;
    old = sample;
    n = 0;
    while (sample == old && n < 20) begin step(); n++; end
  endtask

  initial begin
    int n;
    rst_n = 1'b0; en = 1'b1; fcr = '0; pword = '0; wave_sel = WAVE_SINE; duty = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m_inc = 0; m_acc = 0; m_phase = 0; m_sel = 0; m_duty = 0;
    settle = LAT + 1;  // the reset pipeline is not modelled

    // One wrap every 64 clocks.
    fcr = 32'h0400_0000;
    repeat (1000) step();
    checks++;
    if (period != 64 || wraps < 10) begin failures++; $display("FAIL period %0d wraps %0d", period, wraps); end

    // Random operation: tuning, phase, waveform, duty and enable all move.
    for (int i = 0; i < 20000; i++) begin
      if (i % 997 == 0)  fcr = $urandom() >> $urandom_range(0, 12);
      if (i % 1511 == 0) pword = $urandom();
      if (i % 400 == 0)  wave_sel = wave_sel_e'($urandom_range(0, 3));
      if (i % 700 == 0)  duty = PHASE_W'($urandom());
      en = ($urandom_range(0, 15) != 0);
      step();
    end

    // Phase word latency with the oscillator standing still.
    en = 1'b1; wave_sel = WAVE_SINE; fcr = '0; pword = '0;
    repeat (12) step();
    // Choose P so that the phase is exactly 0, then step it by a quarter.
    pword = 32'(-m_acc);
    repeat (8) step();
    pword = 32'(-m_acc) + 32'h4000_0000;
    latency_to_change(n);
    checks++;
    if (n != 4) begin failures++; $display("FAIL phase word latency %0d, expected 4", n); end

    // Tuning word latency: start moving from standstill.
    pword = 32'(-m_acc);
    repeat (12) step();
    fcr = 32'h0100_0000;
    latency_to_change(n);
    checks++;
    if (n != 6) begin failures++; $display("FAIL tuning word latency %0d, expected 6", n); end

    // Disabled: the phase holds.
    en = 1'b0;
    repeat (5) step();
    n = int'(phase);
    repeat (50) step();
    checks++;
    if (int'(phase) != n) begin failures++; $display("FAIL phase moved while disabled"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
