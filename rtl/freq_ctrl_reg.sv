// freq_ctrl_reg: the frequency control register (FCR).
//
// Holds the tuning word K that sets the output frequency,
//   F_out = K * F_ref / 2^m.
// A host writes a new word by raising `we` for one clock with the word on
// `din`; the register presents it on `fcr` from the next clock edge on and
// keeps it until the next write.  Reset (synchronous, active low) clears it,
// so the synthesizer stands still until it is programmed: the reset value and
// the write strobe are this design's choices.
module freq_ctrl_reg #(
  parameter int unsigned W = dds_pkg::DEF_ACC_W  // tuning word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,    // write strobe
  input  logic [W-1:0] din,   // new tuning word
  output logic [W-1:0] fcr    // current tuning word
);

  always_ff @(posedge clk) begin
    if (!rst_n)  fcr <= '0;
    else if (we) fcr <= din;
  end

endmodule
