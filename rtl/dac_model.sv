// dac_model: behavioural model of the digital-to-analog converter.
//
// Not synthesizable: a DAC is a mixed-signal part, and this model stands in
// for it in simulation.  On every rising edge of the reference clock it
// converts the two's-complement code on `code` into a voltage and holds it
// until the next edge (zero-order hold):
//   vout = VREF * code / 2^(AMP_W-1),
// so full scale is just under +-VREF.  The bipolar output range and VREF are
// this model's choices; the hold between samples is the behaviour whose
// spectral images the reconstruction filter removes.
module dac_model #(
  parameter int unsigned AMP_W = dds_pkg::DEF_AMP_W,
  parameter real         VREF  = 1.0  // volts for a code of 2^(AMP_W-1)
) (
  input  logic                    clk,
  input  logic signed [AMP_W-1:0] code,
  output real                     vout
);

  localparam real LSB = VREF / real'(longint'(1) << (AMP_W - 1));

  initial vout = 0.0;

  always @(posedge clk) vout <= real'(code) * LSB;

endmodule
