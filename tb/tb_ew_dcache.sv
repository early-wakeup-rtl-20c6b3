// tb_ew_dcache: self-checking test of the drowsy data cache.
//
// A reduced cache (16 sets, 2 ways, 32-byte lines, 2-cycle wakeup, sleep
// every 300 cycles) runs against a behavioural next-level memory with a fixed
// read latency and a randomly stalling request handshake. Independent
// reference models give the expected data (a flat word memory updated by the
// stores), hit/miss and way (a tag model with the same replacement rule), and
// the expected latencies: 1 cycle for an awake hit, 1+WAKE for a drowsy hit,
// 1+max(0, WAKE-k) for a line woken through the wakeup port k cycles ucnt0.
// Directed phases check the latencies exactly; a random phase checks data,
// hit/miss, way and the table-update output over thousands of accesses.
module tb_ew_dcache;
  localparam int SETS = 16, WAYS = 2, LB = 32, WAKE = 2, WIN = 300, MLAT = 6;
  localparam int SW = 4, WW = 1, OFF = 5;
  localparam int LINE_BITS = LB * 8;

  logic clk = 1'b0, rst_n, drowsy_en;
  logic req_valid, req_ready;
  ew_pkg::mem_op_e req_op;
  logic [31:0] req_addr, req_wdata, req_pc, rsp_rdata;
  logic [3:0]  req_wstrb;
  logic rsp_valid;
  logic wk_valid;
  logic [SW-1:0] wk_set, upd_set;
  logic [WW-1:0] wk_way, upd_way;
  logic upd_valid;
  logic [31:0] upd_pc;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [3:0]  mem_req_wstrb;
  logic [LINE_BITS-1:0] mem_rsp_line;
  logic ev_access, ev_miss, ev_drowsy;
  logic [SETS*WAYS-1:0] line_active;

  int checks = 0, failures = 0;
  int n_drowsy = 0, n_miss = 0, n_awake_hit = 0, n_hidden = 0, n_partial = 0, n_wstall = 0, n_upd = 0;

  always #5 clk = ~clk;

  ew_dcache #(.ADDR_W(32), .DATA_W(32), .NUM_SETS(SETS), .NUM_WAYS(WAYS), .LINE_BYTES(LB),
              .WAKE_CYCLES(WAKE), .DROWSY_WINDOW(WIN)) dut (.*);

  // ------------------------------------------------------------ reference models
  logic [31:0] gold [int unsigned];   // word address -> data, as the core wrote it
  logic [31:0] back [int unsigned];   // next-level contents, as the cache wrote them

  function automatic logic [31:0] init_word(logic [31:0] wa);
    return (wa * 32'h9E37_79B1) ^ 32'h1357_9BDF;
  endfunction
  function automatic logic [31:0] gold_rd(logic [31:0] wa);
    return gold.exists(wa) ? gold[wa] : init_word(wa);
  endfunction
  function automatic logic [31:0] back_rd(logic [31:0] wa);
    return back.exists(wa) ? back[wa] : init_word(wa);
  endfunction

  bit          r_valid [SETS][WAYS];
  logic [31:0] r_tag   [SETS][WAYS];
  int          r_mru   [SETS];

  // ------------------------------------------------------------ next-level memory
  bit          pend;
  int          pend_cnt;
  logic [31:0] pend_addr;
  int          ready_pct = 75;

  initial begin
    mem_req_ready = 1'b0; mem_rsp_valid = 1'b0; mem_rsp_line = '0; pend = 0;
    forever begin
      @(negedge clk);
      mem_rsp_valid = 1'b0;
      if (pend) begin
        if (pend_cnt == 0) begin
          mem_rsp_valid = 1'b1;
          for (int w = 0; w < LB / 4; w++)
            mem_rsp_line[w*32 +: 32] = back_rd((pend_addr >> 2) + 32'(w));
          pend = 0;
        end else pend_cnt--;
      end
      mem_req_ready = ($urandom % 100) < ready_pct;
      #2;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) begin
          logic [31:0] v;
          v = back_rd(mem_req_addr >> 2);
          for (int b = 0; b < 4; b++) if (mem_req_wstrb[b]) v[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
          back[mem_req_addr >> 2] = v;
        end else begin
          checks++;
          if (pend || mem_req_addr[OFF-1:0] != 0) begin
            failures++; $display("FAIL bad line read request %h", mem_req_addr);
          end
          pend = 1; pend_cnt = MLAT; pend_addr = mem_req_addr;
        end
      end
    end
  end

  // table-update monitor
  int          upd_cnt;
  logic [31:0] last_upd_pc;
  logic [SW-1:0] last_upd_set;
  logic [WW-1:0] last_upd_way;
  initial begin
    upd_cnt = 0;
    forever begin
      @(negedge clk);
      if (upd_valid) begin
        upd_cnt++; last_upd_pc = upd_pc; last_upd_set = upd_set; last_upd_way = upd_way;
      end
    end
  end

  // ------------------------------------------------------------ access driver
  // Issues one access at a negedge, returns latency in cycles from the
  // accepting edge to the response, and the events seen when accepted.
  task automatic access(input ew_pkg::mem_op_e op, input logic [31:0] addr, input logic [31:0] wd,
                        input logic [3:0] strb, input logic [31:0] pc,
                        output int lat, output logic [31:0] rd, output bit was_miss, output bit was_drowsy);
    req_valid = 1'b1; req_op = op; req_addr = addr; req_wdata = wd; req_wstrb = strb; req_pc = pc;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    was_miss = ev_miss; was_drowsy = ev_drowsy;
    checks++;
    if (!ev_access) begin failures++; $display("FAIL ev_access missing"); end
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!rsp_valid && lat < 200) begin @(negedge clk); lat++; end
    rd = rsp_rdata;
  endtask

  // Full check of one access against the reference models.
  // exp_lat < 0: only the latency class is checked.
  task automatic do_access(input ew_pkg::mem_op_e op, input logic [31:0] addr, input logic [31:0] wd,
                           input logic [3:0] strb, input int exp_lat);
    int lat, set, hw, ucnt0;
    logic [31:0] tag, rd, pc, e;
    bit hit, m, d;
    set = int'(addr[OFF +: SW]);
    tag = addr >> (OFF + SW);
    pc  = 32'h0001_0000 + (addr & 32'h0000_0ffc);
    hit = 0; hw = 0;
    for (int w = 0; w < WAYS; w++) if (r_valid[set][w] && r_tag[set][w] == tag) begin hit = 1; hw = w; end
    e = gold_rd(addr >> 2);
    ucnt0 = upd_cnt;
    access(op, addr, wd, strb, pc, lat, rd, m, d);
    @(negedge clk);  // let the update monitor catch up
    // hit / miss
    checks++;
    if (m != !hit) begin failures++; $display("FAIL %h: miss=%0b expected %0b", addr, m, !hit); end
    // latency class
    checks++;
    if (op == ew_pkg::OP_STORE && hit && lat < (d ? 2 : 1)) begin failures++; $display("FAIL store hit latency %0d", lat); end
    else if (op == ew_pkg::OP_STORE) begin end
    else if (hit && !d && lat != 1) begin failures++; $display("FAIL awake hit latency %0d", lat); end
    else if (hit && d && (lat < 2 || lat > 1 + WAKE)) begin failures++; $display("FAIL drowsy hit latency %0d", lat); end
    else if (!hit && op == ew_pkg::OP_LOAD && lat < MLAT + 2) begin failures++; $display("FAIL miss latency %0d", lat); end
    if (exp_lat >= 0) begin
      checks++;
      if (lat != exp_lat) begin failures++; $display("FAIL %h latency %0d expected %0d", addr, lat, exp_lat); end
    end
    if (hit && d) begin n_drowsy++; if (lat < 1 + WAKE) n_partial++; end
    if (hit && !d) n_awake_hit++;
    if (!hit) n_miss++;
    // data
    if (op == ew_pkg::OP_LOAD) begin
      checks++;
      if (rd !== e) begin failures++; $display("FAIL load %h got %h expected %h", addr, rd, e); end
    end else begin
      logic [31:0] v;
      v = e;
      for (int b = 0; b < 4; b++) if (strb[b]) v[b*8 +: 8] = wd[b*8 +: 8];
      gold[addr >> 2] = v;
    end
    // reference tag update
    if (hit) r_mru[set] = hw;
    else if (op == ew_pkg::OP_LOAD) begin
      int v = -1;
      for (int w = 0; w < WAYS; w++) if (!r_valid[set][w] && v < 0) v = w;
      if (v < 0) v = (r_mru[set] + 1) % WAYS;
      r_valid[set][v] = 1; r_tag[set][v] = tag; r_mru[set] = v; hw = v;
    end
    // table update output
    checks++;
    if (hit || op == ew_pkg::OP_LOAD) begin
      if (upd_cnt != ucnt0 + 1 || last_upd_pc != pc || int'(last_upd_set) != set || int'(last_upd_way) != hw) begin
        failures++;
        $display("FAIL update %0d->%0d pc %h set %0d way %0d, expected pc %h set %0d way %0d",
                 ucnt0, upd_cnt, last_upd_pc, last_upd_set, last_upd_way, pc, set, hw);
      end
      n_upd++;
    end else if (upd_cnt != ucnt0) begin
      failures++; $display("FAIL update on store miss");
    end
  endtask

  // Wake a line through the wakeup port k cycles ucnt0 an access is issued.
  task automatic early_then_access(input logic [31:0] addr, input int k, input int exp_lat);
    int set, hw;
    logic [31:0] tag;
    set = int'(addr[OFF +: SW]);
    tag = addr >> (OFF + SW);
    hw = 0;
    for (int w = 0; w < WAYS; w++) if (r_valid[set][w] && r_tag[set][w] == tag) hw = w;
    wk_valid = 1; wk_set = SW'(set); wk_way = WW'(hw);
    if (k == 0) begin
      do_access(ew_pkg::OP_LOAD, addr, 0, 0, exp_lat);  // same cycle
      wk_valid = 0;
    end else begin
      @(negedge clk);
      wk_valid = 0;
      repeat (k - 1) @(negedge clk);
      do_access(ew_pkg::OP_LOAD, addr, 0, 0, exp_lat);
    end
    if (exp_lat == 1) n_hidden++;
  endtask

  // Wait until just after the next global sleep.
  task automatic wait_sleep();
    int t = 0;
    while (line_active != '0 && t < 2 * WIN) begin @(negedge clk); t++; end
    checks++;
    if (line_active != '0) begin failures++; $display("FAIL lines never went drowsy"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; drowsy_en = 1; req_valid = 0; req_op = ew_pkg::OP_LOAD; req_addr = 0; req_wdata = 0;
    req_wstrb = 0; req_pc = 0; wk_valid = 0; wk_set = 0; wk_way = 0;
    for (int s = 0; s < SETS; s++) begin
      r_mru[s] = 0;
      for (int w = 0; w < WAYS; w++) r_valid[s][w] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (line_active != '0) begin failures++; $display("FAIL lines not drowsy after reset"); end

    // --- directed: miss, awake hit, drowsy hit, early wakeup
    ready_pct = 100;
    do_access(ew_pkg::OP_LOAD, 32'h0000_1040, 0, 0, -1);           // miss, fills set 2 way 0
    do_access(ew_pkg::OP_LOAD, 32'h0000_1044, 0, 0, 1);            // awake hit: 1 cycle
    do_access(ew_pkg::OP_STORE, 32'h0000_1048, 32'hCAFE_F00D, 4'hF, 1); // store hit, ready: 1 cycle
    do_access(ew_pkg::OP_LOAD, 32'h0000_1048, 0, 0, 1);
    do_access(ew_pkg::OP_LOAD, 32'h0000_3040, 0, 0, -1);           // miss, set 2 way 1
    do_access(ew_pkg::OP_LOAD, 32'h0000_5040, 0, 0, -1);           // miss, replaces way 0 (LRU)
    do_access(ew_pkg::OP_LOAD, 32'h0000_3050, 0, 0, 1);            // way 1 still there
    wait_sleep();
    do_access(ew_pkg::OP_LOAD, 32'h0000_3054, 0, 0, 1 + WAKE);     // drowsy hit
    do_access(ew_pkg::OP_LOAD, 32'h0000_3058, 0, 0, 1);            // now awake
    wait_sleep();
    for (int k = 0; k <= WAKE + 2; k++) begin
      int e;
      e = (k >= WAKE) ? 1 : 1 + WAKE - k;
      early_then_access(32'h0000_3040, k, e);
      wait_sleep();
    end
    // early wakeup of a different line does not help
    wk_valid = 1; wk_set = 3; wk_way = 0; @(negedge clk); wk_valid = 0;
    repeat (4) @(negedge clk);
    do_access(ew_pkg::OP_LOAD, 32'h0000_5044, 0, 0, 1 + WAKE);
    // byte strobes and write-around store miss
    do_access(ew_pkg::OP_STORE, 32'h0000_5044, 32'h1122_3344, 4'b0101, 1);
    do_access(ew_pkg::OP_LOAD, 32'h0000_5044, 0, 0, 1);
    do_access(ew_pkg::OP_STORE, 32'h0000_7F00, 32'hDEAD_BEEF, 4'hF, 1); // store miss
    do_access(ew_pkg::OP_LOAD, 32'h0000_7F00, 0, 0, -1);               // load miss sees it

    // --- drowsy mode off: lines stay awake
    drowsy_en = 0;
    repeat (2 * WIN) @(negedge clk);
    do_access(ew_pkg::OP_LOAD, 32'h0000_7F04, 0, 0, 1);
    drowsy_en = 1;

    // --- random phase
    ready_pct = 70;
    for (int i = 0; i < 6000; i++) begin
      logic [31:0] a;
      a = ($urandom % 2048) & 32'hFFFF_FFFC;
      if ($urandom % 8 == 0) begin
        // occasional early wakeup of the right or a random line
        wk_valid = 1; wk_set = SW'($urandom); wk_way = WW'($urandom);
        @(negedge clk); wk_valid = 0;
      end
      if ($urandom % 4 == 0)
        do_access(ew_pkg::OP_STORE, a, $urandom, 4'($urandom), -1);
      else
        do_access(ew_pkg::OP_LOAD, a, 0, 0, -1);
      repeat ($urandom % 4) @(negedge clk);
    end
    // write-through: the next level holds everything written
    foreach (gold[wa]) begin
      checks++;
      if (back_rd(wa) !== gold[wa]) begin failures++; $display("FAIL next level word %h", wa << 2); end
    end
    // coverage of the mechanisms
    checks++;
    if (n_drowsy < 20 || n_miss < 20 || n_awake_hit < 20 || n_hidden < 2 || n_partial < 1 || n_upd < 100) begin
      failures++;
    end
    $display("drowsy hits %0d (partial %0d), misses %0d, awake hits %0d, hidden wakeups %0d",
             n_drowsy, n_partial, n_miss, n_awake_hit, n_hidden);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
