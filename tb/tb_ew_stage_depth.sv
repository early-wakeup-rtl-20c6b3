// tb_ew_stage_depth: how much of the wakeup delay early wakeup hides, as a
// function of the wakeup latency W and the number S of pipeline stages
// between Fetch and Mem. The wakeup is sent at the end of Decode, so an
// access to a correctly predicted drowsy line pays max(0, W - (S - 1))
// cycles instead of W:
//   W=2: S=1 no gain (pays 2), S=2 partial (pays 1), S=3 full (pays 0);
//   W=1: S=1 no gain (pays 1), S=2 full (pays 0).
// Each case runs a kernel whose 128 load PCs each read their own line, with
// loads far enough apart that one load's stall never covers the next one's
// wakeup, on an
// ew_top with the default 1024-entry table, once as a conventional drowsy
// cache and once with early wakeup, and checks the wakeup cycles paid per
// access to a drowsy line, and load data.
module tb_ew_stage_depth;
  localparam int NC = 5;
  localparam int WS [NC] = '{2, 2, 2, 1, 1};
  localparam int SS [NC] = '{1, 2, 3, 1, 2};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NC];
  int   cyc_conv [NC], drowsy_conv [NC], cyc_ew [NC], drowsy_ew [NC], wk [NC], ch [NC], fl [NC];
  int   xc [NC], xe [NC];

  for (genvar g = 0; g < NC; g++) begin : g_case
    logic            rst_n, early_wakeup_en, drowsy_en, fe_valid, de_is_mem;
    logic [31:0]     fe_pc, req_addr, req_wdata, req_pc, rsp_rdata;
    logic            req_valid, req_ready, rsp_valid;
    ew_pkg::mem_op_e req_op;
    logic [3:0]      req_wstrb, mem_req_wstrb;
    logic            mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
    logic [31:0]     mem_req_addr, mem_req_wdata;
    logic [255:0]    mem_rsp_line;
    logic            ev_access, ev_miss, ev_drowsy, ev_early_wake;
    logic [1023:0]   line_active;

    ew_top #(.WAKE_CYCLES(WS[g])) dut (.*);

    tb_ew_env #(.STAGES(SS[g]), .ITERS(30), .NPC(128), .GAP(6)) env (
      .clk, .rst_n, .early_wakeup_en, .drowsy_en, .fe_valid, .fe_pc, .de_is_mem,
      .req_valid, .req_ready, .req_op, .req_addr, .req_wdata, .req_wstrb, .req_pc,
      .rsp_valid, .rsp_rdata, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
      .mem_req_wdata, .mem_req_wstrb, .mem_rsp_valid, .mem_rsp_line, .ev_drowsy,
      .ev_early_wake, .line_active, .done(done[g]), .cyc_conv(cyc_conv[g]),
      .drowsy_conv(drowsy_conv[g]), .cyc_ew(cyc_ew[g]), .drowsy_ew(drowsy_ew[g]),
      .wakeups_ew(wk[g]), .extra_conv(xc[g]), .extra_ew(xe[g]), .checks(ch[g]), .failures(fl[g]));
  end

  int checks, failures;

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0; failures = 0;
    for (int g = 0; g < NC; g++) begin
      int pay, n_conv, paid_conv, paid_ew, accesses;
      pay = WS[g] - (SS[g] - 1);
      if (pay < 0) pay = 0;
      checks += ch[g]; failures += fl[g];
      $display("W=%0d S=%0d: conventional %0d drowsy accesses, %0d wakeup cycles; early wakeup %0d drowsy accesses, %0d wakeup cycles",
               WS[g], SS[g], drowsy_conv[g], xc[g], drowsy_ew[g], xe[g]);
      // conventional: every drowsy access pays W
      checks++;
      if (drowsy_conv[g] < 100 || xc[g] != WS[g] * drowsy_conv[g]) begin
        failures++; $display("FAIL conventional W=%0d S=%0d", WS[g], SS[g]);
      end
      // early wakeup: about as many accesses as before reach a not-yet-awake
      // line when pay > 0 and almost none when pay == 0; the cycles paid per
      // access are pay, except for the few unpredicted accesses (first
      // iteration, in flight at a sleep) that pay W.
      checks++;
      accesses = drowsy_conv[g];
      if (pay == 0) begin
        if (drowsy_ew[g] * 20 > accesses) begin failures++; $display("FAIL no full gain"); end
      end else begin
        if (drowsy_ew[g] * 10 < accesses * 9) begin failures++; $display("FAIL drowsy accesses vanished"); end
        if (xe[g] < pay * drowsy_ew[g] || xe[g] > pay * drowsy_ew[g] + (WS[g] - pay) * (accesses / 20 + 1)) begin
          failures++; $display("FAIL paid %0d cycles for %0d accesses, expected about %0d each", xe[g], drowsy_ew[g], pay);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
