// tb_ew_drowsy_timer: checks that the sleep pulse comes exactly every WINDOW
// cycles while enabled, and never while disabled.
module tb_ew_drowsy_timer;
  localparam int W = 37;
  logic clk = 1'b0, rst_n, en, sl;
  int   checks = 0, failures = 0;
  int   cyc, last_pulse, pulses;

  always #5 clk = ~clk;

  ew_drowsy_timer #(.WINDOW(W)) dut (.clk, .rst_n, .enable(en), .sleep_all(sl));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1;
    @(negedge clk); rst_n = 1;
    // cycle numbering: cycle 0 is the first cycle after reset release
    last_pulse = -1; pulses = 0;
    for (cyc = 0; cyc < 10 * W; cyc++) begin
      if (sl) begin
        checks++;
        if ((cyc + 1) % W != 0 || (last_pulse >= 0 && cyc - last_pulse != W)) begin
          failures++;
          $display("FAIL pulse at cycle %0d (previous %0d)", cyc, last_pulse);
        end
        last_pulse = cyc; pulses++;
      end
      @(negedge clk);
    end
    checks++;
    if (pulses != 10) begin failures++; $display("FAIL %0d pulses, expected 10", pulses); end
    // disabled: no pulses
    en = 0;
    for (int i = 0; i < 3 * W; i++) begin
      checks++;
      if (sl) begin failures++; $display("FAIL pulse while disabled"); end
      @(negedge clk);
    end
    // re-enabled: counting resumes, a pulse within W cycles
    en = 1; pulses = 0;
    for (int i = 0; i < W; i++) begin
      if (sl) pulses++;
      @(negedge clk);
    end
    checks++;
    if (pulses != 1) begin failures++; $display("FAIL %0d pulses after re-enable", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
