// lpf_model: behavioural model of the output reconstruction low pass filter.
//
// Not synthesizable: the filter is an analog part.  It is modelled as a
// first-order RC low pass with corner FC_HZ, discretised at the reference
// clock FS_HZ, which is exact for a zero-order-hold input that changes only
// on clock edges:
//   y[n+1] = y[n] + a * (x[n] - y[n]),   a = 1 - exp(-2*pi*FC_HZ/FS_HZ).
// It smooths the DAC staircase into a continuous waveform.  The order and the
// corner frequency are this model's choices: a real design picks them from
// the highest output frequency and the image it must reject.
module lpf_model #(
  parameter real FS_HZ = 100.0e6,  // reference clock rate
  parameter real FC_HZ = 5.0e6     // -3 dB corner
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);

  localparam real PI    = 3.14159265358979323846;
  localparam real ALPHA = 1.0 - $exp(-2.0 * PI * FC_HZ / FS_HZ);

  initial vout = 0.0;

  always @(posedge clk) vout <= vout + ALPHA * (vin - vout);

endmodule
