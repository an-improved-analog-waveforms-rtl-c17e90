// dds_top: direct digital synthesizer, from tuning word to analog output.
//
// A frequency control register holds the tuning word K written by a host.
// The numerically controlled oscillator adds K to a 32-bit phase accumulator
// on every reference clock, adds the phase control word P, and maps the top
// phase bits through a quarter-wave sine table (or forms a cosine, square or
// sawtooth), giving one sample per clock at
//   F_out = K * F_ref / 2^32,   resolution F_ref / 2^32.
// The samples go to the DAC model and on through the reconstruction filter
// model.  The reference oscillator is outside: its clock is `clk`.
//
// Interface: write K with `fcr_we`/`fcr_din`; `pword`, `wave_sel` and `duty`
// are levels sampled every clock.  `sample` is the digital output, `dac_out`
// and `analog_out` are the model voltages.  Reset is synchronous, active low.
// Timing: a write to the FCR changes the sample 7 clocks later (one for the
// register, six through the oscillator); P, waveform and duty take 4.
module dds_top
  import dds_pkg::*;
#(
  parameter int unsigned ACC_W    = DEF_ACC_W,
  parameter int unsigned PHASE_W  = DEF_PHASE_W,
  parameter int unsigned AMP_W    = DEF_AMP_W,
  parameter real         VREF     = 1.0,
  parameter real         FS_HZ    = 100.0e6,
  parameter real         LPF_FC_HZ = 5.0e6
) (
  input  logic                    clk,        // reference clock F_ref
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    fcr_we,
  input  logic [ACC_W-1:0]        fcr_din,
  input  logic [ACC_W-1:0]        pword,
  input  wave_sel_e               wave_sel,
  input  logic [PHASE_W-1:0]      duty,
  output logic [ACC_W-1:0]        fcr,        // tuning word in use
  output logic [PHASE_W-1:0]      phase,
  output logic                    wrap,
  output logic signed [AMP_W-1:0] sample,
  output real                     dac_out,
  output real                     analog_out
);

  freq_ctrl_reg #(.W(ACC_W)) u_fcr (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (fcr_we),
    .din   (fcr_din),
    .fcr   (fcr)
  );

  nco #(.ACC_W(ACC_W), .PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_nco (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .fcr      (fcr),
    .pword    (pword),
    .wave_sel (wave_sel),
    .duty     (duty),
    .phase    (phase),
    .wrap     (wrap),
    .sample   (sample)
  );

  dac_model #(.AMP_W(AMP_W), .VREF(VREF)) u_dac (
    .clk  (clk),
    .code (sample),
    .vout (dac_out)
  );

  lpf_model #(.FS_HZ(FS_HZ), .FC_HZ(LPF_FC_HZ)) u_lpf (
    .clk  (clk),
    .vin  (dac_out),
    .vout (analog_out)
  );

endmodule
