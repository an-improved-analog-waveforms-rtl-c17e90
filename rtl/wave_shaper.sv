// wave_shaper: phase-to-amplitude conversion for four waveforms.
//
// From the truncated phase it makes, as `wave_sel` asks:
//   sine      - the quarter-wave table (sine_lut);
//   cosine    - the same table read a quarter cycle ahead (phase + 2^(PHASE_W-2));
//   square    - +full scale while phase < duty, -full scale otherwise, so the
//               duty cycle is duty / 2^PHASE_W;
//   sawtooth  - the phase itself as an offset-binary ramp from -2^(AMP_W-1)
//               up to 2^(AMP_W-1)-1 over one period.
// Full scale is 2^(AMP_W-1)-1.  The waveform list and the variable duty
// cycle of the square wave follow the description of the synthesizer; how
// each is formed is this design's choice.
//
// Timing: three clocks from `phase`, `wave_sel` and `duty` to `sample`; all
// waveforms are delayed alike, so a change of waveform takes effect on a
// clean sample boundary.
module wave_shaper
  import dds_pkg::*;
#(
  parameter int unsigned PHASE_W = DEF_PHASE_W,
  parameter int unsigned AMP_W   = DEF_AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      phase,
  input  wave_sel_e               wave_sel,
  input  logic [PHASE_W-1:0]      duty,    // square wave high time, in phase units
  output logic signed [AMP_W-1:0] sample
);

  localparam logic signed [AMP_W-1:0] FULL = AMP_W'((1 << (AMP_W - 1)) - 1);
  localparam logic [PHASE_W-1:0]      QUARTER = PHASE_W'(1) << (PHASE_W - 2);

  logic [PHASE_W-1:0]      lut_phase;
  logic signed [AMP_W-1:0] lut_sample;
  logic [AMP_W-1:0]        ramp;
  logic signed [AMP_W-1:0] other_d1, other_d2;
  wave_sel_e               sel_d1, sel_d2;

  // Cosine is the sine a quarter period ahead.
  assign lut_phase = (wave_sel == WAVE_COSINE) ? phase + QUARTER : phase;

  sine_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_lut (
    .clk    (clk),
    .rst_n  (rst_n),
    .phase  (lut_phase),
    .sample (lut_sample)
  );

  // Phase as an unsigned ramp of AMP_W bits: its top bits, or the whole
  // phase padded with zeros when the phase is the narrower of the two.
  if (PHASE_W >= AMP_W) begin : g_ramp_trunc
    assign ramp = phase[PHASE_W-1 -: AMP_W];
  end else begin : g_ramp_pad
    assign ramp = {phase, {(AMP_W - PHASE_W){1'b0}}};
  end

  // Square and sawtooth are formed directly and delayed to match the table.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      other_d1 <= '0;
      other_d2 <= '0;
      sel_d1   <= WAVE_SINE;
      sel_d2   <= WAVE_SINE;
      sample   <= '0;
    end else begin
      if (wave_sel == WAVE_SQUARE) other_d1 <= (phase < duty) ? FULL : -FULL;
      else                         other_d1 <= $signed({~ramp[AMP_W-1], ramp[AMP_W-2:0]});
      other_d2 <= other_d1;
      sel_d1   <= wave_sel;
      sel_d2   <= sel_d1;
      sample   <= (sel_d2 == WAVE_SINE || sel_d2 == WAVE_COSINE) ? lut_sample : other_d2;
    end
  end

endmodule
