// ew_dcache: drowsy L1 data cache with a separate early-wakeup port.
//
// Every data line has its own power mode (ew_line_pwr_ctrl). A line in
// drowsy mode keeps its contents but must be woken, which takes WAKE_CYCLES
// cycles, before it can be read or written. The conventional drowsy policy
// (ew_drowsy_timer) periodically puts all lines to sleep; an access to a
// drowsy line wakes it on demand and stalls for the wakeup latency. The early
// wakeup technique adds a second, wakeup-only address port (wk_valid plus a
// set index and way number, with its own decoder): a line woken through it
// before the access arrives costs no extra cycles. The wakeup port only
// raises a line's supply; it never touches bit lines or word lines, so it
// works in parallel with the normal access port.
//
// Organisation (defaults: 32 KB, 2-way, 32-byte lines, 512 sets): set
// associative, tags and valid bits always at nominal supply so that hit/miss
// and the hit way are known without waking anything (only the data lines are
// drowsy), replacement of the way after the most recently used one (LRU for
// two ways), write-through with no allocation on a store miss, loads refill
// whole lines from the next level.
//
// Access port timing (valid/ready, one request at a time):
//   - load hit on an awake line: accepted in cycle t, rsp_valid/rsp_rdata in
//     t+1, and a new request can be accepted in t+1 (1-cycle latency);
//   - hit on a drowsy line: ev_drowsy pulses in t, rsp in t+1+WAKE_CYCLES
//     (less if an early wakeup of that line is already in progress);
//   - store hit: the line is written and the word written through on the
//     mem_* port; rsp when the next level has accepted the write;
//   - load miss: line read on the mem_* port, the victim line is woken
//     meanwhile, rsp the cycle after the line has been filled.
// upd_* pulses once for every access that touched a line (hits and fills),
// giving the PC of the load/store with the set and way it used: it feeds the
// prediction table.
// Next-level port: mem_req_* is a valid/ready request (write: one word with
// byte strobes; read: a line address), held stable until accepted;
// mem_rsp_valid with mem_rsp_line returns the line of an accepted read, at
// any later cycle.
// The drowsy line modes, the wakeup latency and the extra wakeup port follow
// the document; awake tags, write-through, the replacement rule and the
// handshakes are this design's choices.
module ew_dcache #(
  parameter int unsigned ADDR_W        = ew_pkg::ADDR_W,
  parameter int unsigned DATA_W        = ew_pkg::DATA_W,
  parameter int unsigned NUM_SETS      = ew_pkg::NUM_SETS,
  parameter int unsigned NUM_WAYS      = ew_pkg::NUM_WAYS,
  parameter int unsigned LINE_BYTES    = ew_pkg::LINE_BYTES,
  parameter int unsigned WAKE_CYCLES   = ew_pkg::WAKE_CYCLES,
  parameter int unsigned DROWSY_WINDOW = ew_pkg::DROWSY_WINDOW,
  localparam int unsigned SET_W        = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  localparam int unsigned WAY_W        = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1,
  localparam int unsigned STRB_W       = DATA_W / 8,
  localparam int unsigned LINE_BITS    = LINE_BYTES * 8,
  localparam int unsigned NUM_LINES    = NUM_SETS * NUM_WAYS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  drowsy_en,      // 0: lines never put to sleep
  // access port (memory stage)
  input  logic                  req_valid,
  output logic                  req_ready,
  input  ew_pkg::mem_op_e               req_op,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [DATA_W-1:0]     req_wdata,
  input  logic [STRB_W-1:0]     req_wstrb,
  input  logic [ADDR_W-1:0]     req_pc,
  output logic                  rsp_valid,
  output logic [DATA_W-1:0]     rsp_rdata,
  // early wakeup port
  input  logic                  wk_valid,
  input  logic [SET_W-1:0]      wk_set,
  input  logic [WAY_W-1:0]      wk_way,
  // prediction table update
  output logic                  upd_valid,
  output logic [ADDR_W-1:0]     upd_pc,
  output logic [SET_W-1:0]      upd_set,
  output logic [WAY_W-1:0]      upd_way,
  // next level
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [ADDR_W-1:0]     mem_req_addr,
  output logic [DATA_W-1:0]     mem_req_wdata,
  output logic [STRB_W-1:0]     mem_req_wstrb,
  input  logic                  mem_rsp_valid,
  input  logic [LINE_BITS-1:0]  mem_rsp_line,
  // observation
  output logic                  ev_access,      // request accepted
  output logic                  ev_miss,        // accepted request missed
  output logic                  ev_drowsy,      // accepted hit found its line not awake
  output logic [NUM_LINES-1:0]  line_active     // per line: supply at nominal (index way*NUM_SETS+set)
);

  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned WORD_W = (LINE_BYTES * 8 / DATA_W > 1) ? $clog2(LINE_BYTES * 8 / DATA_W) : 1;
  localparam int unsigned BOFF_W = $clog2(STRB_W);
  localparam int unsigned TAG_W  = ADDR_W - SET_W - OFF_W;
  localparam int unsigned LIDX_W = $clog2(NUM_LINES);

  typedef enum logic [2:0] {
    S_IDLE,    // ready for a request
    S_WAKE,    // waiting for a drowsy hit line to wake
    S_WRITE,   // waiting for the next level to accept a write-through
    S_MREQ,    // issuing a line read to the next level
    S_MWAIT,   // waiting for the line
    S_FILL     // waiting for the victim line to be awake, then filling
  } state_e;

  // ---------------------------------------------------------------- storage
  logic [TAG_W-1:0]     tag_mem  [NUM_LINES];
  logic [NUM_LINES-1:0] valid_q;
  logic [LINE_BITS-1:0] data_mem [NUM_LINES];
  logic [WAY_W-1:0]     mru_q    [NUM_SETS];

  // ---------------------------------------------------------------- registered request
  state_e               state_q, state_d;
  ew_pkg::mem_op_e      op_q;
  logic [ADDR_W-1:0]    addr_q, pc_q;
  logic [DATA_W-1:0]    wdata_q;
  logic [STRB_W-1:0]    wstrb_q;
  logic [WAY_W-1:0]     way_q;
  logic [LINE_BITS-1:0] fill_q;

  // ---------------------------------------------------------------- line power control
  logic [NUM_LINES-1:0] line_wake, line_awake;
  logic                 sleep_all;
  logic                 dm_valid;              // demand wakeup of line (cur_set, dm_way)
  logic [WAY_W-1:0]     dm_way;

  // ---------------------------------------------------------------- current request view
  logic                 idle;
  ew_pkg::mem_op_e      cur_op;
  logic [ADDR_W-1:0]    cur_addr, cur_pc;
  logic [DATA_W-1:0]    cur_wdata;
  logic [STRB_W-1:0]    cur_wstrb;
  logic [SET_W-1:0]     cur_set;
  logic [TAG_W-1:0]     cur_tag;
  logic [WORD_W-1:0]    cur_word;

  assign idle      = (state_q == S_IDLE);
  assign cur_op    = idle ? req_op    : op_q;
  assign cur_addr  = idle ? req_addr  : addr_q;
  assign cur_pc    = idle ? req_pc    : pc_q;
  assign cur_wdata = idle ? req_wdata : wdata_q;
  assign cur_wstrb = idle ? req_wstrb : wstrb_q;
  assign cur_set   = cur_addr[OFF_W +: SET_W];
  assign cur_tag   = cur_addr[ADDR_W-1 -: TAG_W];
  assign cur_word  = cur_addr[BOFF_W +: WORD_W];

  function automatic logic [LIDX_W-1:0] lidx(input logic [WAY_W-1:0] way,
                                              input logic [SET_W-1:0] set);
    return LIDX_W'(way) * LIDX_W'(NUM_SETS) + LIDX_W'(set);
  endfunction

  // ---------------------------------------------------------------- tag lookup
  logic                 hit;
  logic [WAY_W-1:0]     hit_way, victim_way;
  logic                 have_invalid;
  logic [WAY_W-1:0]     invalid_way;

  always_comb begin
    hit          = 1'b0;
    hit_way      = '0;
    have_invalid = 1'b0;
    invalid_way  = '0;
    for (int w = 0; w < NUM_WAYS; w++) begin
      if (valid_q[lidx(WAY_W'(w), cur_set)] &&
          tag_mem[lidx(WAY_W'(w), cur_set)] == cur_tag && !hit) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!valid_q[lidx(WAY_W'(w), cur_set)] && !have_invalid) begin
        have_invalid = 1'b1;
        invalid_way  = WAY_W'(w);
      end
    end
    if (have_invalid)
      victim_way = invalid_way;
    else if (32'(mru_q[cur_set]) == NUM_WAYS - 1)
      victim_way = '0;
    else
      victim_way = mru_q[cur_set] + 1'b1;
  end

  // ---------------------------------------------------------------- control
  logic             ld_now, st_now, fill_now, done;
  logic [WAY_W-1:0] act_way;                  // way used by ld_now/st_now
  logic [ADDR_W-1:0] line_addr;

  assign act_way   = idle ? hit_way : way_q;
  assign line_addr = {cur_addr[ADDR_W-1:OFF_W], OFF_W'(0)};

  always_comb begin
    state_d       = state_q;
    req_ready     = idle;
    dm_valid      = 1'b0;
    dm_way        = way_q;
    ld_now        = 1'b0;
    st_now        = 1'b0;
    fill_now      = 1'b0;
    done          = 1'b0;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {cur_addr[ADDR_W-1:BOFF_W], BOFF_W'(0)};
    mem_req_wdata = cur_wdata;
    mem_req_wstrb = cur_wstrb;
    ev_access     = 1'b0;
    ev_miss       = 1'b0;
    ev_drowsy     = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (req_valid) begin
          ev_access = 1'b1;
          if (hit) begin
            if (!line_awake[lidx(hit_way, cur_set)]) begin
              ev_drowsy = 1'b1;
              dm_valid  = 1'b1;
              dm_way    = hit_way;
              state_d   = S_WAKE;
            end else if (cur_op == ew_pkg::OP_LOAD) begin
              ld_now = 1'b1;
              done   = 1'b1;
            end else begin
              st_now        = 1'b1;
              mem_req_valid = 1'b1;
              mem_req_we    = 1'b1;
              if (mem_req_ready) done = 1'b1;
              else               state_d = S_WRITE;
            end
          end else begin
            ev_miss = 1'b1;
            if (cur_op == ew_pkg::OP_LOAD) begin
              dm_valid = 1'b1;             // start waking the victim line
              dm_way   = victim_way;
              state_d  = S_MREQ;
            end else begin                 // store miss: write around
              mem_req_valid = 1'b1;
              mem_req_we    = 1'b1;
              if (mem_req_ready) done = 1'b1;
              else               state_d = S_WRITE;
            end
          end
        end
      end
      S_WAKE: begin
        dm_valid = 1'b1;
        if (line_awake[lidx(way_q, cur_set)]) begin
          if (cur_op == ew_pkg::OP_LOAD) begin
            ld_now  = 1'b1;
            done    = 1'b1;
            state_d = S_IDLE;
          end else begin
            st_now        = 1'b1;
            mem_req_valid = 1'b1;
            mem_req_we    = 1'b1;
            if (mem_req_ready) begin
              done    = 1'b1;
              state_d = S_IDLE;
            end else begin
              state_d = S_WRITE;
            end
          end
        end
      end
      S_WRITE: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        if (mem_req_ready) begin
          done    = 1'b1;
          state_d = S_IDLE;
        end
      end
      S_MREQ: begin
        dm_valid      = 1'b1;
        mem_req_valid = 1'b1;
        mem_req_addr  = line_addr;
        if (mem_req_ready) state_d = S_MWAIT;
      end
      S_MWAIT: begin
        dm_valid = 1'b1;
        if (mem_rsp_valid) state_d = S_FILL;
      end
      S_FILL: begin
        dm_valid = 1'b1;
        if (line_awake[lidx(way_q, cur_set)]) begin
          fill_now = 1'b1;
          done     = 1'b1;
          state_d  = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  // ---------------------------------------------------------------- datapath
  logic [LINE_BITS-1:0] line_rd, line_wr;

  assign line_rd = data_mem[lidx(act_way, cur_set)];

  always_comb begin
    line_wr = line_rd;
    for (int b = 0; b < STRB_W; b++) begin
      if (cur_wstrb[b])
        line_wr[32'(cur_word) * DATA_W + b * 8 +: 8] = cur_wdata[b*8 +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (st_now)   data_mem[lidx(act_way, cur_set)] <= line_wr;
    if (fill_now) begin
      data_mem[lidx(way_q, cur_set)] <= fill_q;
      tag_mem[lidx(way_q, cur_set)]  <= cur_tag;
    end
    if (state_q == S_MWAIT && mem_rsp_valid) fill_q <= mem_rsp_line;
    if (idle && req_valid) begin
      op_q    <= req_op;
      addr_q  <= req_addr;
      pc_q    <= req_pc;
      wdata_q <= req_wdata;
      wstrb_q <= req_wstrb;
      way_q   <= hit ? hit_way : victim_way;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      valid_q   <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      upd_valid <= 1'b0;
      upd_pc    <= '0;
      upd_set   <= '0;
      upd_way   <= '0;
      for (int s = 0; s < NUM_SETS; s++) mru_q[s] <= '0;
    end else begin
      state_q   <= state_d;
      rsp_valid <= done;
      if (ld_now)   rsp_rdata <= line_rd[32'(cur_word) * DATA_W +: DATA_W];
      if (fill_now) rsp_rdata <= fill_q[32'(cur_word) * DATA_W +: DATA_W];
      if (fill_now) valid_q[lidx(way_q, cur_set)] <= 1'b1;
      upd_valid <= ld_now || st_now || fill_now;
      if (ld_now || st_now || fill_now) begin
        upd_pc  <= cur_pc;
        upd_set <= cur_set;
        upd_way <= fill_now ? way_q : act_way;
        mru_q[cur_set] <= fill_now ? way_q : act_way;
      end
    end
  end

  // ---------------------------------------------------------------- drowsy lines
  ew_drowsy_timer #(.WINDOW(DROWSY_WINDOW)) u_timer (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (drowsy_en),
    .sleep_all(sleep_all)
  );

  for (genvar w = 0; w < NUM_WAYS; w++) begin : g_way
    for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
      localparam int unsigned L = w * NUM_SETS + s;
      // Two decoders: the access port's demand wakeup and the early wakeup port.
      assign line_wake[L] = (dm_valid && dm_way == WAY_W'(w) && cur_set == SET_W'(s)) ||
                            (wk_valid && wk_way == WAY_W'(w) && wk_set  == SET_W'(s));
      ew_line_pwr_ctrl #(.WAKE_CYCLES(WAKE_CYCLES)) u_line (
        .clk   (clk),
        .rst_n (rst_n),
        .wake  (line_wake[L]),
        .sleep (sleep_all),
        .active(line_active[L]),
        .awake (line_awake[L])
      );
    end
  end

  // ---------------------------------------------------------------- protocol checks
  // A request to the next level stays stable until it is accepted.
  a_mem_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr) && $stable(mem_req_we));
  // The access port never completes two things at once.
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ld_now, st_now, fill_now}));

endmodule
