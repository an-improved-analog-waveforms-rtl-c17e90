// phase_accumulator: increment register and modulo-2^m phase accumulator.
//
// The tuning word is first copied into an increment register; every
// reference clock the accumulator then adds the increment to its own value,
// discarding the carry, so it works as a modulus-2^m counter whose step is
// the tuning word.  The accumulator overflows F_out times a second, once per
// output period, and `wrap` marks the clock on which that happens.
//
// Timing: a tuning word presented on `fcr_in` at edge t is in the increment
// register after edge t, and first changes the step taken at edge t+1.
// With `en` low the accumulator holds its phase (the increment register
// still follows `fcr_in`).  Reset (synchronous, active low) clears both.
// The enable is this design's addition.
module phase_accumulator #(
  parameter int unsigned ACC_W = dds_pkg::DEF_ACC_W  // accumulator word length m
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [ACC_W-1:0] fcr_in,  // tuning word from the FCR
  output logic [ACC_W-1:0] acc,     // current phase, 0 .. 2^m-1
  output logic             wrap     // high for one clock after an overflow
);

  logic [ACC_W-1:0] inc_reg;
  logic [ACC_W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, inc_reg};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inc_reg <= '0;
      acc     <= '0;
      wrap    <= 1'b0;
    end else begin
      inc_reg <= fcr_in;
      if (en) begin
        acc  <= sum[ACC_W-1:0];
        wrap <= sum[ACC_W];
      end else begin
        wrap <= 1'b0;
      end
    end
  end

endmodule
