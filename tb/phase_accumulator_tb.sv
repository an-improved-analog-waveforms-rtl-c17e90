// phase_accumulator_tb: runs the accumulator against a 64-bit software
// model, cycle by cycle: the one-clock increment register, the modulo-2^32
// wrap and its pulse, holding while disabled, and tuning word changes.
module phase_accumulator_tb;
  localparam int unsigned ACC_W = 32;

  logic             clk = 1'b0;
  logic             rst_n, en, wrap;
  logic [ACC_W-1:0] fcr_in, acc;
  longint unsigned  m_inc, m_acc;
  bit               m_wrap;
  int checks = 0, failures = 0, wraps = 0, holds = 0;

  phase_accumulator #(.ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .fcr_in(fcr_in), .acc(acc), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    longint unsigned s;
    @(posedge clk);
    s = m_acc + m_inc;
    if (en) begin
      m_wrap = (s >= (64'd1 << ACC_W));
      m_acc  = s % (64'd1 << ACC_W);
    end else begin
      m_wrap = 1'b0;
    end
    m_inc = fcr_in;
    #1;
    checks++;
    if (acc !== m_acc[ACC_W-1:0] || wrap !== m_wrap) begin
      failures++;
      $display("FAIL acc=%h wrap=%b expected %h %b", acc, wrap, m_acc, m_wrap);
    end
    if (wrap) wraps++;
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b1; fcr_in = 32'h1234_5678;
    @(posedge clk); #1;
    m_inc = 0; m_acc = 0; m_wrap = 0;
    checks++;
    if (acc !== '0 || wrap !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    // Paper example tuning word, then large random words to force wraps.
    fcr_in = 32'd21475;
    // First step uses the reset increment (0): increment register latency.
    step_and_check();
    checks++;
    if (acc !== '0) begin failures++; $display("FAIL increment register latency"); end
    step_and_check();
    checks++;
    if (acc !== 32'd21475) begin failures++; $display("FAIL first step %0d", acc); end
    for (int i = 0; i < 3000; i++) begin
      if (i % 500 == 0) fcr_in = $urandom();
      en = ($urandom_range(0, 7) != 0);
      if (!en) holds++;
      step_and_check();
    end
    // Half-range increment: wraps every second clock.
    en = 1'b1; fcr_in = 32'h8000_0000;
    repeat (20) step_and_check();
    checks++;
    if (wraps < 10 || holds == 0) begin
      failures++; $display("FAIL coverage wraps=%0d holds=%0d", wraps, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
