// tb_ew_wakeup_ctrl: random decode-stage inputs; the wakeup request must
// appear one cycle later exactly when the instruction is a new load/store
// with a table hit and the mechanism is enabled, carrying the table's set
// index and way number.
module tb_ew_wakeup_ctrl;
  localparam int SW = 9, WW = 1;
  logic clk = 1'b0, rst_n;
  logic en, de_new, de_is_mem, pt_hit;
  logic [SW-1:0] pt_set, wk_set, exp_set;
  logic [WW-1:0] pt_way, wk_way, exp_way;
  logic wk_valid, exp_valid;
  int   checks = 0, failures = 0, fired = 0;

  always #5 clk = ~clk;

  ew_wakeup_ctrl #(.SET_W(SW), .WAY_W(WW)) dut (
    .clk, .rst_n, .enable(en), .de_new, .de_is_mem, .pt_hit, .pt_set, .pt_way,
    .wk_valid, .wk_set, .wk_way);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; de_new = 0; de_is_mem = 0; pt_hit = 0; pt_set = 0; pt_way = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_valid = 0;
    for (int i = 0; i < 2000; i++) begin
      en        = ($urandom % 8) != 0;
      de_new    = $urandom % 2;
      de_is_mem = $urandom % 2;
      pt_hit    = $urandom % 2;
      pt_set    = SW'($urandom);
      pt_way    = WW'($urandom);
      exp_valid = en && de_new && de_is_mem && pt_hit;
      exp_set   = pt_set;
      exp_way   = pt_way;
      checks++;
      if (wk_valid) begin failures++; $display("FAIL combinational wakeup"); end
      @(posedge clk); #1;
      checks++;
      if (wk_valid !== exp_valid || (exp_valid && (wk_set !== exp_set || wk_way !== exp_way))) begin
        failures++;
        $display("FAIL cycle %0d: wk %0b/%0d/%0d expected %0b/%0d/%0d", i,
                 wk_valid, wk_set, wk_way, exp_valid, exp_set, exp_way);
      end
      if (wk_valid) fired++;
      @(negedge clk);
      de_new = 0;
      @(negedge clk);
    end
    checks++;
    if (fired < 100) begin failures++; $display("FAIL only %0d wakeups", fired); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
