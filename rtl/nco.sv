// nco: numerically controlled oscillator.
//
// The chain from tuning word to digital sample: the phase accumulator (with
// its increment register), the phase adder that adds the phase control word
// P and truncates the phase, and the phase-to-amplitude converter that turns
// the phase into a sine, cosine, square or sawtooth sample.  It produces one
// sample per reference clock, at
//   F_out = fcr * F_ref / 2^ACC_W.
//
// Timing, counted in clocks from the edge that samples an input:
//   fcr      -> first changed phase step after 2, first changed sample after 6
//   pword    -> sample after 4
//   wave_sel, duty -> sample after 4 (they are registered with the phase)
// so frequency, phase and waveform all change within a few sample periods
// and without a break in phase.  `wrap` pulses once per output period.
module nco
  import dds_pkg::*;
#(
  parameter int unsigned ACC_W   = DEF_ACC_W,
  parameter int unsigned PHASE_W = DEF_PHASE_W,
  parameter int unsigned AMP_W   = DEF_AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,        // advance the phase
  input  logic [ACC_W-1:0]        fcr,       // tuning word K
  input  logic [ACC_W-1:0]        pword,     // phase control word P
  input  wave_sel_e               wave_sel,
  input  logic [PHASE_W-1:0]      duty,      // square wave duty, in phase units
  output logic [PHASE_W-1:0]      phase,     // truncated phase (table address)
  output logic                    wrap,      // accumulator overflow
  output logic signed [AMP_W-1:0] sample
);

  logic [ACC_W-1:0]   acc;
  wave_sel_e          wave_sel_q;
  logic [PHASE_W-1:0] duty_q;

  phase_accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .fcr_in (fcr),
    .acc    (acc),
    .wrap   (wrap)
  );

  phase_adder #(.ACC_W(ACC_W), .PHASE_W(PHASE_W)) u_padd (
    .clk   (clk),
    .rst_n (rst_n),
    .acc   (acc),
    .pword (pword),
    .phase (phase)
  );

  // Waveform controls travel alongside the phase register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wave_sel_q <= WAVE_SINE;
      duty_q     <= '0;
    end else begin
      wave_sel_q <= wave_sel;
      duty_q     <= duty;
    end
  end

  wave_shaper #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_shape (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase),
    .wave_sel (wave_sel_q),
    .duty     (duty_q),
    .sample   (sample)
  );

endmodule
