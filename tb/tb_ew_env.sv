// tb_ew_env: behavioural environment for one ew_top instance (testbench
// helper, not synthesizable).
//
// It holds an in-order pipeline model with STAGES stages between Fetch and
// Mem, a next-level memory with a MLAT-cycle read latency and a reference
// memory for load data. After reset it runs the loop kernel below twice,
// first as a conventional drowsy cache (early wakeup off), then with early
// wakeup on, and reports cycles and accesses to drowsy lines for both runs,
// the wakeup cycles those accesses paid (response latency minus the 1-cycle
// hit latency), with its own check counts, then raises "done".
// The kernel: NPC load PCs, each loading from its own fixed data line, with
// GAP ALU instructions after each load (accesses that are perfectly
// predictable from the PC given enough table entries).
// A load sends its request from Mem and receives the data in the next
// stage (write-back); a response that comes later than the next cycle
// stalls the whole pipeline until it arrives.
module tb_ew_env #(
  parameter int STAGES = 4,
  parameter int ITERS  = 40,
  parameter int NPC    = 128,
  parameter int GAP    = 1,
  parameter int MLAT   = 8,
  parameter int NL     = 1024
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            early_wakeup_en,
  output logic            drowsy_en,
  output logic            fe_valid,
  output logic [31:0]     fe_pc,
  output logic            de_is_mem,
  output logic            req_valid,
  input  logic            req_ready,
  output ew_pkg::mem_op_e req_op,
  output logic [31:0]     req_addr,
  output logic [31:0]     req_wdata,
  output logic [3:0]      req_wstrb,
  output logic [31:0]     req_pc,
  input  logic            rsp_valid,
  input  logic [31:0]     rsp_rdata,
  input  logic            mem_req_valid,
  output logic            mem_req_ready,
  input  logic            mem_req_we,
  input  logic [31:0]     mem_req_addr,
  input  logic [31:0]     mem_req_wdata,
  input  logic [3:0]      mem_req_wstrb,
  output logic            mem_rsp_valid,
  output logic [255:0]    mem_rsp_line,
  input  logic            ev_drowsy,
  input  logic            ev_early_wake,
  input  logic [NL-1:0]   line_active,
  output logic            done,
  output int              cyc_conv,
  output int              drowsy_conv,
  output int              cyc_ew,
  output int              drowsy_ew,
  output int              wakeups_ew,
  output int              extra_conv,   // wakeup cycles paid by accesses to drowsy lines
  output int              extra_ew,
  output int              checks,
  output int              failures
);

  function automatic logic [31:0] init_word(logic [31:0] wa);
    return (wa * 32'h9E37_79B1) ^ 32'h0BAD_CAFE;
  endfunction

  // next level: read-only data here (the kernel only loads)
  bit          pend;
  int          pend_cnt;
  logic [31:0] pend_addr;
  initial begin
    mem_req_ready = 1'b1; mem_rsp_valid = 1'b0; mem_rsp_line = '0; pend = 0;
    forever begin
      @(negedge clk);
      mem_rsp_valid = 1'b0;
      if (pend) begin
        if (pend_cnt == 0) begin
          mem_rsp_valid = 1'b1;
          for (int w = 0; w < 8; w++) mem_rsp_line[w*32 +: 32] = init_word((pend_addr >> 2) + 32'(w));
          pend = 0;
        end else pend_cnt--;
      end
      #2;
      if (mem_req_valid && mem_req_ready && !mem_req_we) begin
        pend = 1; pend_cnt = MLAT - 1; pend_addr = mem_req_addr;
      end
    end
  end

  typedef struct {
    int          valid;
    int          is_mem;
    logic [31:0] pc;
    logic [31:0] addr;
  } instr_t;

  localparam int BODY = (GAP + 1) * NPC;

  function automatic instr_t make_instr(int seq);
    instr_t r;
    int i = seq / BODY, k = seq % BODY;
    r.valid  = 1;
    r.pc     = 32'h0040_0000 + 32'(k * 4);
    r.is_mem = (k % (GAP + 1) == 0);
    // load number k/2 reads its own line; lines spread over the sets,
    // the word moves with the iteration
    r.addr   = 32'h2000_0000 + 32'(k / (GAP + 1)) * 32'd96 + 32'(i % 8) * 4;
    return r;
  endfunction

  instr_t st [STAGES + 2];   // 0 Fetch ... STAGES+1 Mem
  instr_t wb;                // write-back: waits for the cache response

  task automatic run(input bit ew, output int cyc, output int nd, output int nw, output int ex);
    instr_t empty;
    int total, next_seq, retired, acc_cyc;
    bit adv, wb_wait, wb_done, m_mem, acc_drowsy;
    empty.valid = 0; empty.is_mem = 0; empty.pc = 0; empty.addr = 0;
    total = ITERS * BODY;
    rst_n = 0; drowsy_en = 1; early_wakeup_en = ew;
    fe_valid = 0; fe_pc = 0; de_is_mem = 0; req_valid = 0; req_op = ew_pkg::OP_LOAD;
    req_addr = 0; req_wdata = 0; req_wstrb = 0; req_pc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < STAGES + 2; s++) st[s] = empty;
    wb = empty; wb_wait = 0;
    retired = 0; adv = 0; cyc = 0; nd = 0; nw = 0; ex = 0; acc_drowsy = 0; acc_cyc = 0;
    st[0] = make_instr(0);
    next_seq = 1;
    while (retired < total && cyc < 5_000_000) begin
      @(negedge clk);
      cyc++;
      // pipeline shift decided in the previous cycle; a load leaving Mem
      // had its request accepted and now waits for the response in WB
      if (adv) begin
        if (wb.valid) retired++;
        wb = st[STAGES+1];
        wb_wait = wb.valid && wb.is_mem != 0;
        for (int s = STAGES + 1; s > 0; s--) st[s] = st[s-1];
        if (next_seq < total) begin
          st[0] = make_instr(next_seq);
          next_seq++;
        end else begin
          st[0] = empty;
        end
      end
      // write-back: a late response stalls the whole pipeline
      wb_done = !wb_wait;
      if (wb_wait && rsp_valid) begin
        if (acc_drowsy) ex += cyc - acc_cyc - 1;
        checks++;
        if (rsp_rdata !== init_word(wb.addr >> 2)) begin
          failures++;
          $display("FAIL load %h got %h", wb.addr, rsp_rdata);
        end
        wb_wait = 0;
        wb_done = 1;
      end
      // memory stage: issue once the previous access has completed
      m_mem     = st[STAGES+1].valid && st[STAGES+1].is_mem != 0;
      req_valid = m_mem && wb_done;
      req_addr  = st[STAGES+1].addr;
      req_pc    = st[STAGES+1].pc;
      adv       = wb_done && (!m_mem || req_ready);
      fe_valid  = adv && st[0].valid;
      fe_pc     = st[0].pc;
      de_is_mem = st[1].valid && st[1].is_mem != 0;
      #1;
      if (req_valid && req_ready) begin
        acc_drowsy = ev_drowsy;
        acc_cyc    = cyc;
        if (ev_drowsy) nd++;
      end
      if (ev_early_wake) nw++;
    end
    fe_valid = 0; req_valid = 0;
    checks++;
    if (retired != total) begin failures++; $display("FAIL %0d of %0d retired", retired, total); end
  endtask

  initial begin
    int unused;
    done = 0; checks = 0; failures = 0;
    run(1'b0, cyc_conv, drowsy_conv, unused, extra_conv);
    run(1'b1, cyc_ew, drowsy_ew, wakeups_ew, extra_ew);
    done = 1;
  end

endmodule
