// dds_top_tb: end-to-end test of the synthesizer at its default sizes
// (32-bit accumulator, 12 phase bits, 12-bit samples, 100 MHz reference).
//
// It programs the tuning word 21475, which gives 500 Hz from 100 MHz, runs
// more than one full output period and measures the period between
// accumulator overflows (2^32 / 21475 = 199998.5 clocks, so
// 199998 or 199999 between overflows, 500.004 Hz).  It then switches
// frequency, steps the phase word, runs every waveform (the square wave at
// two duty cycles), stops the oscillator, and drives a tone high enough for
// the reconstruction filter to attenuate.  A cycle-accurate model of the
// register pipeline checks every digital sample; the analog outputs are
// checked against the sample and against the filter's expected smoothing.
// Each mechanism is counted and must occur at least once.
module dds_top_tb;
  import dds_pkg::*;
  import dds_ref_pkg::*;
  localparam int unsigned ACC_W = 32, PHASE_W = 12, AMP_W = 12;
  localparam int unsigned LAT = 3;  // phase register to sample, in edges

  logic                    clk = 1'b0;
  logic                    rst_n, en, fcr_we, wrap;
  logic [ACC_W-1:0]        fcr_din, pword, fcr;
  wave_sel_e               wave_sel;
  logic [PHASE_W-1:0]      duty, phase;
  logic signed [AMP_W-1:0] sample;
  real                     dac_out, analog_out;

  longint unsigned m_fcr, m_inc, m_acc;  // 64-bit model of the 32-bit registers
  int unsigned     m_phase, m_sel, m_duty;
  int              exp_q[$];
  int              settle, cyc = 0, last_wrap = -1, period = 0;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_fcr_write = 0, n_wrap = 0, n_phase_step = 0, n_hold = 0;
  int n_fold = 0, n_negative = 0, n_duty_change = 0;
  int n_wave[4];

  dds_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .fcr_we(fcr_we), .fcr_din(fcr_din),
    .pword(pword), .wave_sel(wave_sel), .duty(duty), .fcr(fcr), .phase(phase),
    .wrap(wrap), .sample(sample), .dac_out(dac_out), .analog_out(analog_out));

  always #5 clk = ~clk;  // 100 MHz

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    cyc++;
    m_phase = int'(((m_acc + longint'(pword)) % (64'd1 << ACC_W)) >> (ACC_W - PHASE_W));
    if (en) m_acc = (m_acc + m_inc) % (64'd1 << ACC_W);
    m_inc  = m_fcr;
    if (fcr_we) m_fcr = 64'(fcr_din);
    m_sel  = int'(wave_sel);
    m_duty = int'(duty);
    exp_q.push_back(wave_ref(m_phase, m_sel, m_duty, PHASE_W, AMP_W));
    #1;
    if (!en) n_hold++;
    n_wave[m_sel]++;
    if (m_sel <= 1 && m_phase[PHASE_W-2]) n_fold++;
    if (sample < 0) n_negative++;
    if (wrap) begin
      n_wrap++;
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

  task automatic write_fcr(logic [ACC_W-1:0] k);
    fcr_we = 1'b1; fcr_din = k;
    step();
    fcr_we = 1'b0;
    n_fcr_write++;
  endtask

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real err, max_err, dpk, apk;
    int  p0, w0;
    rst_n = 1'b0; en = 1'b1; fcr_we = 1'b0; fcr_din = '0; pword = '0;
    wave_sel = WAVE_SINE; duty = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m_fcr = 0; m_inc = 0; m_acc = 0; m_phase = 0; m_sel = 0; m_duty = 0;
    settle = LAT + 1;

    // 500 Hz from 100 MHz: K = 500 * 2^32 / 100e6 = 21475.
    write_fcr(32'd21475);
    expect_true(fcr == 32'd21475, "FCR holds the tuning word");
    max_err = 0.0;
    // Two overflows bound one complete output period.
    while (n_wrap < 2 && cyc < 450_000) begin
      step();
      // The 500 Hz tone lies far below the filter corner: the filtered
      // output follows the DAC to well within one percent of full scale.
      err = analog_out - dac_out;
      if (err < 0.0) err = -err;
      if (cyc > 100 && err > max_err) max_err = err;
    end
    expect_true(period == 199_998 || period == 199_999, $sformatf("500 Hz period %0d clocks", period));
    $display("measured period %0d clocks: %.4f Hz", period, 100.0e6 / real'(period));
    expect_true(max_err < 0.005, $sformatf("filtered 500 Hz tracks the DAC (max error %f)", max_err));
    // At the DAC, the code maps to VREF * code / 2048.
    expect_true(dac_out > -1.0 && dac_out < 1.0, "DAC output within +-VREF");

    // Frequency switch to 100 kHz: K = 2^32 / 1000, period 1000 clocks.
    write_fcr(32'd4294967);
    repeat (3500) step();
    expect_true(period == 1000 || period == 1001, $sformatf("100 kHz period %0d clocks", period));

    // Phase step of a quarter cycle.
    pword = 32'h4000_0000; n_phase_step++;
    repeat (300) step();

    // Every waveform; the square at 25 % and 75 % duty.
    wave_sel = WAVE_COSINE;   repeat (1200) step();
    wave_sel = WAVE_SQUARE;   duty = 12'd1024; n_duty_change++;
    repeat (1200) step();
    duty = 12'd3072; n_duty_change++;
    repeat (1200) step();
    wave_sel = WAVE_SAWTOOTH; repeat (1200) step();

    // Stop: the phase holds while disabled.
    en = 1'b0;
    repeat (5) step();
    p0 = int'(phase); w0 = n_wrap;
    repeat (2000) step();
    expect_true(int'(phase) == p0 && n_wrap == w0, "phase holds while disabled");
    en = 1'b1;

    // 25 MHz sine (4 samples per cycle): the filter must attenuate it.
    // Four samples a cycle, 90 degrees apart: the largest is at least
    // sin(45 degrees) of full scale wherever the phase stands.
    wave_sel = WAVE_SINE;
    write_fcr(32'h4000_0000);
    dpk = 0.0; apk = 0.0;
    for (int i = 0; i < 400; i++) begin
      step();
      if (i > 100) begin
        if (dac_out > dpk) dpk = dac_out;
        if (analog_out > apk) apk = analog_out;
      end
    end
    expect_true(dpk > 0.7 && apk < 0.5 * dpk,
                $sformatf("25 MHz tone attenuated: DAC peak %f, filter peak %f", dpk, apk));

    // Every mechanism must have happened.
    $display("fcr writes %0d, wraps %0d, phase steps %0d, holds %0d, folded reads %0d,",
             n_fcr_write, n_wrap, n_phase_step, n_hold, n_fold);
    $display("negative samples %0d, duty changes %0d, sine %0d cosine %0d square %0d sawtooth %0d",
             n_negative, n_duty_change, n_wave[0], n_wave[1], n_wave[2], n_wave[3]);
    expect_true(n_fcr_write > 0, "FCR write happened");
    expect_true(n_wrap > 0, "accumulator wrap happened");
    expect_true(n_phase_step > 0, "phase word step happened");
    expect_true(n_hold > 0, "disable/hold happened");
    expect_true(n_fold > 0, "quarter-wave address fold happened");
    expect_true(n_negative > 0, "sign flip happened");
    expect_true(n_duty_change > 0, "duty change happened");
    foreach (n_wave[k]) expect_true(n_wave[k] > 0, $sformatf("waveform %0d used", k));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
