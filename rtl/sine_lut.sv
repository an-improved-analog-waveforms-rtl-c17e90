// sine_lut: full-wave sine from a quarter-wave table by folding.
//
// The two top bits of the phase select the quadrant.  The second highest bit
// decides how the table is addressed: in the second and fourth quadrants the
// remaining bits are inverted, so the table is read backwards.  The highest
// bit decides the sign: in the second half-cycle the magnitude read from the
// table is negated.  This is the whole-wave-from-one-quarter scheme; the
// sample is two's complement, from -(2^(AMP_W-1)-1) to +(2^(AMP_W-1)-1).
//
// Timing: two clocks from `phase` to `sample` (table read, then sign).
module sine_lut #(
  parameter int unsigned PHASE_W = dds_pkg::DEF_PHASE_W,
  parameter int unsigned AMP_W   = dds_pkg::DEF_AMP_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      phase,
  output logic signed [AMP_W-1:0] sample
);

  localparam int unsigned ADDR_W = PHASE_W - 2;

  logic [ADDR_W-1:0] addr;
  logic [AMP_W-2:0]  mag;
  logic              neg_q;

  // Second highest phase bit: read the table forwards or backwards.
  assign addr = phase[PHASE_W-2] ? ~phase[ADDR_W-1:0] : phase[ADDR_W-1:0];

  sine_rom #(.ADDR_W(ADDR_W), .DATA_W(AMP_W - 1)) u_rom (
    .clk  (clk),
    .addr (addr),
    .data (mag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      neg_q  <= 1'b0;
      sample <= '0;
    end else begin
      // Highest phase bit: sign of the output, aligned with the table read.
      neg_q  <= phase[PHASE_W-1];
      sample <= neg_q ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end

endmodule
