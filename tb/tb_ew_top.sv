// tb_ew_top: end-to-end test of the early-wakeup drowsy data cache at its
// default size (32 KB, 2-way, 1024-entry prediction table, 1-cycle wakeup,
// sleep every 4000 cycles).
//
// A behavioural in-order pipeline (Fetch, Decode, Issue, Reg, Exe, Mem) runs
// a loop kernel whose loads and stores walk a sequential array, a small
// strided array (a different line every iteration) and a scalar, so that table predictions
// are sometimes right and sometimes wrong. An access is sent from Mem and
// its response is expected in the next stage (write-back); a later response
// stalls the whole pipeline. The next level is a behavioural
// memory with an 8-cycle latency. The same program runs three times: lines
// never drowsy, conventional drowsy cache, drowsy cache with early wakeup.
// Checked: every load's data against a reference memory, that early wakeup
// reduces both the accesses to drowsy lines and the cycle count against the
// conventional drowsy cache, that no configuration beats the never-drowsy
// cache, and that each mechanism (early wakeup, table hit, demand wakeup,
// miss and refill, global sleep, stalled write-through, mode switches)
// happened.
module tb_ew_top;
  localparam int MLAT  = 8;
  localparam int ITERS = 3000;
  localparam int BODY  = 12;         // instructions per loop iteration
  localparam int NL    = 1024;       // lines in the default cache

  logic clk = 1'b0, rst_n, early_wakeup_en, drowsy_en;
  logic fe_valid, de_is_mem;
  logic [31:0] fe_pc;
  logic req_valid, req_ready, rsp_valid;
  ew_pkg::mem_op_e req_op;
  logic [31:0] req_addr, req_wdata, req_pc, rsp_rdata;
  logic [3:0]  req_wstrb;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [3:0]  mem_req_wstrb;
  logic [255:0] mem_rsp_line;
  logic ev_access, ev_miss, ev_drowsy, ev_early_wake;
  logic [NL-1:0] line_active;

  always #5 clk = ~clk;

  ew_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ memories
  logic [31:0] gold [int unsigned];
  logic [31:0] back [int unsigned];
  function automatic logic [31:0] init_word(logic [31:0] wa);
    return (wa * 32'h9E37_79B1) ^ 32'h2468_ACE0;
  endfunction
  function automatic logic [31:0] gold_rd(logic [31:0] wa);
    return gold.exists(wa) ? gold[wa] : init_word(wa);
  endfunction
  function automatic logic [31:0] back_rd(logic [31:0] wa);
    return back.exists(wa) ? back[wa] : init_word(wa);
  endfunction

  bit          pend;
  int          pend_cnt;
  logic [31:0] pend_addr;
  int          n_wstall;
  initial begin
    mem_req_ready = 0; mem_rsp_valid = 0; mem_rsp_line = '0; pend = 0; n_wstall = 0;
    forever begin
      @(negedge clk);
      mem_rsp_valid = 1'b0;
      if (pend) begin
        if (pend_cnt == 0) begin
          mem_rsp_valid = 1'b1;
          for (int w = 0; w < 8; w++) mem_rsp_line[w*32 +: 32] = back_rd((pend_addr >> 2) + 32'(w));
          pend = 0;
        end else pend_cnt--;
      end
      mem_req_ready = ($urandom % 10) != 0;
      #2;
      if (mem_req_valid && !mem_req_ready && mem_req_we) n_wstall++;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) begin
          logic [31:0] v;
          v = back_rd(mem_req_addr >> 2);
          for (int b = 0; b < 4; b++) if (mem_req_wstrb[b]) v[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
          back[mem_req_addr >> 2] = v;
        end else begin
          pend = 1; pend_cnt = MLAT - 1; pend_addr = mem_req_addr;
        end
      end
    end
  end

  // ------------------------------------------------------------ program
  // Instruction k of iteration i. Kinds: 0 ALU, 1 load, 2 store.
  typedef struct {
    int          valid;
    int          kind;
    logic [31:0] pc;
    logic [31:0] addr;
    logic [31:0] wdata;
  } instr_t;

  function automatic instr_t make_instr(int seq);
    instr_t r;
    int i = seq / BODY, k = seq % BODY;
    r.valid = 1;
    r.pc    = 32'h0040_0000 + 32'(k * 4);
    r.kind  = 0;
    r.addr  = 0;
    r.wdata = 32'(seq) * 32'h0101_0101;
    case (k)
      1:  begin r.kind = 1; r.addr = 32'h1000_0000 + 32'(i % 2048) * 4;   end  // a[i], sequential
      3:  begin r.kind = 1; r.addr = 32'h1002_0000 + 32'(i % 2) * 64;    end  // b[16*(i%2)], other line
      5:  begin r.kind = 1; r.addr = 32'h1004_0010;                       end  // scalar
      7:  begin r.kind = 2; r.addr = 32'h1006_0000 + 32'(i % 2048) * 4;   end  // c[i] = ...
      9:  begin r.kind = 1; r.addr = 32'h1006_0000 + 32'(i % 2048) * 4;   end  // reload c[i]
      default: ;
    endcase
    return r;
  endfunction

  // ------------------------------------------------------------ pipeline model
  instr_t st [6];   // 0 F, 1 D, 2 I, 3 R, 4 E, 5 M
  instr_t wb;      // write-back
  int     next_seq, retired;
  bit     adv, wb_wait, wb_done, m_mem;
  int     cycles, n_ew, n_drowsy, n_miss, n_sleep, n_mem, n_awake_sum;
  logic   prev_any_active;

  task automatic run(input bit drowsy, input bit ew, output int cyc, output int nd,
                     output int new_, output longint act_sum);
    instr_t empty;
    int total;
    empty.valid = 0; empty.kind = 0; empty.pc = 0; empty.addr = 0; empty.wdata = 0;
    total = ITERS * BODY;
    rst_n = 0; drowsy_en = drowsy; early_wakeup_en = ew;
    fe_valid = 0; fe_pc = 0; de_is_mem = 0; req_valid = 0; req_op = ew_pkg::OP_LOAD;
    req_addr = 0; req_wdata = 0; req_wstrb = 0; req_pc = 0;
    gold.delete(); back.delete();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 6; s++) st[s] = empty;
    next_seq = 0; retired = 0; adv = 0; wb = empty; wb_wait = 0;
    cyc = 0; nd = 0; new_ = 0; act_sum = 0; prev_any_active = 0;
    st[0] = make_instr(next_seq);
    next_seq++;
    while (retired < total && cyc < 2_000_000) begin
      @(negedge clk);
      cyc++;
      // 1. pipeline shift decided in the previous cycle; an access leaving
      //    Mem was accepted by the cache and waits for its response in WB
      if (adv) begin
        if (wb.valid) retired++;
        wb = st[5];
        wb_wait = wb.valid && wb.kind != 0;
        for (int s = 5; s > 0; s--) st[s] = st[s-1];
        if (next_seq < total) begin
          st[0] = make_instr(next_seq);
          next_seq++;
        end else begin
          st[0] = empty;
        end
      end
      // 2. write-back: a response later than the next cycle stalls everything
      wb_done = !wb_wait;
      if (wb_wait && rsp_valid) begin
        if (wb.kind == 1) begin
          checks++;
          if (rsp_rdata !== gold_rd(wb.addr >> 2)) begin
            failures++;
            $display("FAIL load %h got %h expected %h", wb.addr, rsp_rdata, gold_rd(wb.addr >> 2));
          end
        end else begin
          gold[wb.addr >> 2] = wb.wdata;
        end
        wb_wait = 0;
        wb_done = 1;
      end
      // 3. memory stage: issue once the previous access has completed
      m_mem     = st[5].valid && st[5].kind != 0;
      req_valid = m_mem && wb_done;
      req_op    = (st[5].kind == 2) ? ew_pkg::OP_STORE : ew_pkg::OP_LOAD;
      req_addr  = st[5].addr; req_wdata = st[5].wdata; req_wstrb = 4'hF; req_pc = st[5].pc;
      adv       = wb_done && (!m_mem || req_ready);
      fe_valid  = adv && st[0].valid;
      fe_pc     = st[0].pc;
      de_is_mem = st[1].valid && st[1].kind != 0;
      #1;
      if (req_valid && req_ready) begin
        n_mem++;
        if (ev_drowsy) nd++;
        if (ev_miss) n_miss++;
      end
      if (ev_early_wake) new_++;
      if (prev_any_active && line_active == '0) n_sleep++;
      prev_any_active = (line_active != '0);
      act_sum += longint'($countones(line_active));
    end
    fe_valid = 0; req_valid = 0;
    checks++;
    if (retired != total) begin failures++; $display("FAIL only %0d of %0d instructions retired", retired, total); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     c_awake, c_drowsy, c_ew, d_awake, d_drowsy, d_ew, w_awake, w_drowsy, w_ew;
  longint a_awake, a_drowsy, a_ew;
  initial begin
    n_miss = 0; n_sleep = 0; n_mem = 0;
    run(1'b0, 1'b0, c_awake,  d_awake,  w_awake,  a_awake);   // lines never drowsy
    run(1'b1, 1'b0, c_drowsy, d_drowsy, w_drowsy, a_drowsy);  // conventional drowsy cache
    run(1'b1, 1'b1, c_ew,     d_ew,     w_ew,     a_ew);      // early wakeup
    $display("never drowsy : %0d cycles, %0d drowsy accesses", c_awake, d_awake);
    $display("drowsy       : %0d cycles, %0d drowsy accesses, %0d%% lines drowsy",
             c_drowsy, d_drowsy, 100 - int'(a_drowsy * 100 / (longint'(c_drowsy) * NL)));
    $display("early wakeup : %0d cycles, %0d drowsy accesses, %0d%% lines drowsy, %0d wakeups issued",
             c_ew, d_ew, 100 - int'(a_ew * 100 / (longint'(c_ew) * NL)), w_ew);
    if (d_drowsy > 0)
      $display("drowsy accesses removed: %0d%%, extra delay removed: %0d%%",
               (d_drowsy - d_ew) * 100 / d_drowsy,
               (c_drowsy > c_awake) ? ((c_drowsy - c_ew) * 100 / (c_drowsy - c_awake)) : 0);
    // mechanism and comparison checks
    checks++; if (w_awake != 0 || w_drowsy != 0) begin failures++; $display("FAIL wakeup while disabled"); end
    checks++; if (w_ew < 100) begin failures++; $display("FAIL too few early wakeups (%0d)", w_ew); end
    checks++; if (d_drowsy < 50) begin failures++; $display("FAIL too few drowsy accesses (%0d)", d_drowsy); end
    checks++; if (d_ew >= d_drowsy) begin failures++; $display("FAIL early wakeup did not cut drowsy accesses"); end
    checks++; if (c_ew >= c_drowsy) begin failures++; $display("FAIL early wakeup did not cut cycles"); end
    checks++; if (c_awake > c_ew) begin failures++; $display("FAIL drowsy faster than never-drowsy"); end
    checks++; if (n_sleep < 6) begin failures++; $display("FAIL too few global sleeps (%0d)", n_sleep); end
    checks++; if (n_miss < 100) begin failures++; $display("FAIL too few misses (%0d)", n_miss); end
    checks++; if (n_wstall < 1) begin failures++; $display("FAIL no stalled write-through"); end
    checks++; if (a_awake <= a_ew) begin failures++; $display("FAIL drowsy mode did not lower active lines"); end
    $display("sleeps %0d, misses %0d, write stalls %0d, memory accesses %0d", n_sleep, n_miss, n_wstall, n_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
