// ew_top: drowsy L1 data cache with PC-based early wakeup.
//
// The processor fetches an instruction and, in the same cycle, looks up the
// prediction table with its PC. In the next cycle (decode) the table entry,
// a set index and way number, is known together with whether the instruction
// is a load or store. If it is and the lookup hit, the predicted data cache
// line is woken through the cache's wakeup port, so that by the time the
// instruction reaches the memory stage the line is usually already out of
// drowsy mode and the access costs no wakeup cycles. Every access the cache
// completes writes the set and way it used back into the table under the
// load/store's PC.
//
// The processor pipeline and the next memory level are outside this module.
// Pipeline interface:
//   fe_valid/fe_pc  - an instruction leaves the fetch stage this cycle;
//   de_is_mem       - in the following cycle (its first in decode): it is a
//                     load or store;
//   req_* / rsp_*   - memory-stage access port of the data cache (see
//                     ew_dcache), req_pc being the PC of the load/store.
// With stages Decode, Issue, Reg, Exe between Fetch and Mem, as in the
// document's pipeline, a line is woken in the issue stage and is accessible
// WAKE_CYCLES cycles later, so a 1- or 2-cycle wakeup is hidden completely.
// early_wakeup_en = 0 gives the conventional drowsy cache, drowsy_en = 0 a
// cache whose lines never go drowsy.
module ew_top #(
  parameter int unsigned ADDR_W        = ew_pkg::ADDR_W,
  parameter int unsigned DATA_W        = ew_pkg::DATA_W,
  parameter int unsigned NUM_SETS      = ew_pkg::NUM_SETS,
  parameter int unsigned NUM_WAYS      = ew_pkg::NUM_WAYS,
  parameter int unsigned LINE_BYTES    = ew_pkg::LINE_BYTES,
  parameter int unsigned PT_ENTRIES    = ew_pkg::PT_ENTRIES,
  parameter int unsigned WAKE_CYCLES   = ew_pkg::WAKE_CYCLES,
  parameter int unsigned DROWSY_WINDOW = ew_pkg::DROWSY_WINDOW,
  localparam int unsigned SET_W        = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  localparam int unsigned WAY_W        = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1,
  localparam int unsigned STRB_W       = DATA_W / 8,
  localparam int unsigned LINE_BITS    = LINE_BYTES * 8,
  localparam int unsigned NUM_LINES    = NUM_SETS * NUM_WAYS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 early_wakeup_en,
  input  logic                 drowsy_en,
  // fetch and decode stages
  input  logic                 fe_valid,
  input  logic [ADDR_W-1:0]    fe_pc,
  input  logic                 de_is_mem,
  // memory stage
  input  logic                 req_valid,
  output logic                 req_ready,
  input  ew_pkg::mem_op_e      req_op,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [DATA_W-1:0]    req_wdata,
  input  logic [STRB_W-1:0]    req_wstrb,
  input  logic [ADDR_W-1:0]    req_pc,
  output logic                 rsp_valid,
  output logic [DATA_W-1:0]    rsp_rdata,
  // next memory level
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic                 mem_req_we,
  output logic [ADDR_W-1:0]    mem_req_addr,
  output logic [DATA_W-1:0]    mem_req_wdata,
  output logic [STRB_W-1:0]    mem_req_wstrb,
  input  logic                 mem_rsp_valid,
  input  logic [LINE_BITS-1:0] mem_rsp_line,
  // observation
  output logic                 ev_access,
  output logic                 ev_miss,
  output logic                 ev_drowsy,
  output logic                 ev_early_wake,
  output logic [NUM_LINES-1:0] line_active
);

  logic             de_new;
  logic             pt_hit;
  logic [SET_W-1:0] pt_set;
  logic [WAY_W-1:0] pt_way;
  logic             wk_valid;
  logic [SET_W-1:0] wk_set;
  logic [WAY_W-1:0] wk_way;
  logic              upd_valid;
  logic [ADDR_W-1:0] upd_pc;
  logic [SET_W-1:0]  upd_set;
  logic [WAY_W-1:0]  upd_way;

  // The instruction fetched in one cycle is in decode in the next.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) de_new <= 1'b0;
    else        de_new <= fe_valid;
  end

  ew_pred_table #(
    .ENTRIES(PT_ENTRIES), .ADDR_W(ADDR_W), .SET_W(SET_W), .WAY_W(WAY_W)
  ) u_pt (
    .clk   (clk),
    .rst_n (rst_n),
    .rd_en (fe_valid),
    .rd_pc (fe_pc),
    .rd_hit(pt_hit),
    .rd_set(pt_set),
    .rd_way(pt_way),
    .wr_en (upd_valid),
    .wr_pc (upd_pc),
    .wr_set(upd_set),
    .wr_way(upd_way)
  );

  ew_wakeup_ctrl #(.SET_W(SET_W), .WAY_W(WAY_W)) u_wk (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (early_wakeup_en),
    .de_new   (de_new),
    .de_is_mem(de_is_mem),
    .pt_hit   (pt_hit),
    .pt_set   (pt_set),
    .pt_way   (pt_way),
    .wk_valid (wk_valid),
    .wk_set   (wk_set),
    .wk_way   (wk_way)
  );

  ew_dcache #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_SETS(NUM_SETS), .NUM_WAYS(NUM_WAYS),
    .LINE_BYTES(LINE_BYTES), .WAKE_CYCLES(WAKE_CYCLES), .DROWSY_WINDOW(DROWSY_WINDOW)
  ) u_dc (
    .clk          (clk),
    .rst_n        (rst_n),
    .drowsy_en    (drowsy_en),
    .req_valid    (req_valid),
    .req_ready    (req_ready),
    .req_op       (req_op),
    .req_addr     (req_addr),
    .req_wdata    (req_wdata),
    .req_wstrb    (req_wstrb),
    .req_pc       (req_pc),
    .rsp_valid    (rsp_valid),
    .rsp_rdata    (rsp_rdata),
    .wk_valid     (wk_valid),
    .wk_set       (wk_set),
    .wk_way       (wk_way),
    .upd_valid    (upd_valid),
    .upd_pc       (upd_pc),
    .upd_set      (upd_set),
    .upd_way      (upd_way),
    .mem_req_valid(mem_req_valid),
    .mem_req_ready(mem_req_ready),
    .mem_req_we   (mem_req_we),
    .mem_req_addr (mem_req_addr),
    .mem_req_wdata(mem_req_wdata),
    .mem_req_wstrb(mem_req_wstrb),
    .mem_rsp_valid(mem_rsp_valid),
    .mem_rsp_line (mem_rsp_line),
    .ev_access    (ev_access),
    .ev_miss      (ev_miss),
    .ev_drowsy    (ev_drowsy),
    .line_active  (line_active)
  );

  assign ev_early_wake = wk_valid;

endmodule
