// sine_rom: quarter-wave sine magnitude table.
//
// Holds the magnitude of the first quarter (0 .. pi/2) of a sine wave in
// 2^ADDR_W words; the other three quarters are produced around it by
// folding (sine_lut).  Entry i is
//   round((2^DATA_W - 1) * sin(pi/2 * (i + 0.5) / 2^ADDR_W)),
// sampled half a step into each interval so that the table read backwards
// gives exactly the second quarter.  The contents are computed when the
// design is elaborated.  The read is synchronous: `data` shows the entry of
// `addr` one clock later.
module sine_rom #(
  parameter int unsigned ADDR_W = dds_pkg::DEF_PHASE_W - 2,  // 1024 words
  parameter int unsigned DATA_W = dds_pkg::DEF_AMP_W - 1     // magnitude bits
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam real         PI    = 3.14159265358979323846;

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t quarter_sine();
    table_t t;
    real    full_scale;
    full_scale = real'((longint'(1) << DATA_W) - 1);
    for (int i = 0; i < DEPTH; i++) begin
      t[i] = DATA_W'($rtoi(full_scale * $sin(PI / 2.0 * (real'(i) + 0.5) / real'(DEPTH)) + 0.5));
    end
    return t;
  endfunction

  localparam table_t ROM = quarter_sine();

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
