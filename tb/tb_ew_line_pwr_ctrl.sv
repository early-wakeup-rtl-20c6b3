// tb_ew_line_pwr_ctrl: checks the drowsy/waking/awake sequence of one line
// controller for wakeup latencies of 1 and 3 cycles: reset state, exact
// wakeup latency, supply raised while waking, sleep, wake-over-sleep
// priority and sleep aborting a wakeup.
module tb_ew_line_pwr_ctrl;
  logic clk = 1'b0;
  logic rst_n;
  logic wake1, sleep1, act1, awk1;
  logic wake3, sleep3, act3, awk3;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  ew_line_pwr_ctrl #(.WAKE_CYCLES(1)) dut1 (.clk, .rst_n, .wake(wake1), .sleep(sleep1), .active(act1), .awake(awk1));
  ew_line_pwr_ctrl #(.WAKE_CYCLES(3)) dut3 (.clk, .rst_n, .wake(wake3), .sleep(sleep3), .active(act3), .awake(awk3));

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Pulse wake on a line with latency lat, count edges until awake.
  task automatic measure_wake(int lat);
    int n;
    @(negedge clk);
    if (lat == 1) wake1 = 1'b1; else wake3 = 1'b1;
    @(negedge clk);
    wake1 = 1'b0; wake3 = 1'b0;
    n = 1;
    while (!(lat == 1 ? awk1 : awk3) && n < 20) begin
      chk("active while waking", (lat == 1 ? act1 : act3), 1'b1);
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != lat) begin
      failures++;
      $display("FAIL wake latency %0d, expected %0d", n, lat);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wake1 = 0; sleep1 = 0; wake3 = 0; sleep3 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("reset drowsy 1", awk1, 1'b0); chk("reset inactive 1", act1, 1'b0);
    chk("reset drowsy 3", awk3, 1'b0); chk("reset inactive 3", act3, 1'b0);
    // stays drowsy without wake
    repeat (5) @(negedge clk);
    chk("stays drowsy", awk3, 1'b0);
    measure_wake(1);
    measure_wake(3);
    // stays awake
    repeat (5) @(negedge clk);
    chk("stays awake 1", awk1, 1'b1); chk("stays awake 3", awk3, 1'b1);
    // wake while awake is a no-op
    wake3 = 1; @(negedge clk); wake3 = 0;
    chk("wake when awake", awk3, 1'b1);
    // sleep
    sleep1 = 1; sleep3 = 1; @(negedge clk); sleep1 = 0; sleep3 = 0;
    chk("sleep 1", awk1, 1'b0); chk("sleep inactive 1", act1, 1'b0);
    chk("sleep 3", awk3, 1'b0); chk("sleep inactive 3", act3, 1'b0);
    // wake and sleep together on an awake line: wake wins
    measure_wake(1);
    wake1 = 1; sleep1 = 1; @(negedge clk); wake1 = 0; sleep1 = 0;
    chk("wake beats sleep", awk1, 1'b1);
    // sleep during a wakeup aborts it
    wake3 = 1; @(negedge clk); wake3 = 0;
    chk("waking active", act3, 1'b1); chk("waking not awake", awk3, 1'b0);
    sleep3 = 1; @(negedge clk); sleep3 = 0;
    chk("abort inactive", act3, 1'b0);
    repeat (4) @(negedge clk);
    chk("abort stays drowsy", awk3, 1'b0);
    // held wake level wakes with the same latency
    measure_wake(3);
    // reset returns to drowsy
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk("reset again", awk3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
