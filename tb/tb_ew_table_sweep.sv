// tb_ew_table_sweep: the prediction-table sizes of the evaluation (1024,
// 256 and 64 entries; 512 and 128 fall between) on one kernel whose 128
// load PCs each read their own data line. With 1024 or 256 entries every
// load PC has its own entry and early wakeup hides nearly every access to a
// drowsy line; with 64 entries four PCs share an entry and the prediction is
// the line of another load. Checked: load data, that every size keeps or
// lowers the drowsy accesses of the conventional drowsy cache, that larger
// tables remove at least as many as smaller ones, and that the 64-entry table
// removes clearly fewer than the 1024-entry one.
module tb_ew_table_sweep;
  localparam int NS = 3;
  localparam int SIZES [NS] = '{1024, 256, 64};
  localparam int ITERS = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NS];
  int   cyc_conv [NS], drowsy_conv [NS], cyc_ew [NS], drowsy_ew [NS], wk [NS], ch [NS], fl [NS], xc [NS], xe [NS];

  for (genvar g = 0; g < NS; g++) begin : g_size
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

    ew_top #(.PT_ENTRIES(SIZES[g])) dut (.*);

    tb_ew_env #(.STAGES(4), .ITERS(ITERS), .NPC(128)) env (
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
    int red [NS];
    repeat (2) @(posedge clk);
    wait (done[0] && done[1] && done[2]);
    checks = 0; failures = 0;
    for (int g = 0; g < NS; g++) begin
      checks += ch[g]; failures += fl[g];
      red[g] = (drowsy_conv[g] > 0) ? (drowsy_conv[g] - drowsy_ew[g]) * 100 / drowsy_conv[g] : 0;
      $display("%4d entries: drowsy accesses %0d -> %0d (-%0d%%), cycles %0d -> %0d, %0d wakeups",
               SIZES[g], drowsy_conv[g], drowsy_ew[g], red[g], cyc_conv[g], cyc_ew[g], wk[g]);
      checks++;
      if (drowsy_conv[g] < 50 || drowsy_ew[g] > drowsy_conv[g] || cyc_ew[g] > cyc_conv[g]) begin
        failures++; $display("FAIL size %0d", SIZES[g]);
      end
    end
    checks++;
    if (!(red[0] >= red[1] && red[1] >= red[2])) begin failures++; $display("FAIL reduction not ordered by size"); end
    checks++;
    if (red[0] < 80 || red[0] - red[2] < 30) begin failures++; $display("FAIL table size makes too little difference"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
