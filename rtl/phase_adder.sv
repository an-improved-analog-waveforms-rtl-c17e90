// phase_adder: adds the phase control word P to the accumulated phase and
// forms the table address.
//
// The sum acc + P is taken modulo 2^m and only its PHASE_W most significant
// bits are kept: they address the waveform table (phase truncation).  The
// result is registered, so P (and the accumulator value) reach `phase` one
// clock later.  P has the full accumulator width, so one step of P is the
// same phase step as one step of the tuning word; that width, the truncation
// to PHASE_W bits and the output register are this design's choices.  The
// low ACC_W-PHASE_W bits of the sum are unused on purpose: only their carry
// into the kept bits matters, and lint reports them as unused.
module phase_adder #(
  parameter int unsigned ACC_W   = dds_pkg::DEF_ACC_W,
  parameter int unsigned PHASE_W = dds_pkg::DEF_PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ACC_W-1:0]   acc,    // accumulated phase
  input  logic [ACC_W-1:0]   pword,  // phase control word P
  output logic [PHASE_W-1:0] phase   // truncated phase, table address
);

  logic [ACC_W-1:0] sum;

  assign sum = acc + pword;

  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= sum[ACC_W-1 -: PHASE_W];
  end

endmodule
