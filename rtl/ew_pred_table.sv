// ew_pred_table: PC-indexed way/set prediction table.
//
// Each entry holds the data cache set index and way number that the
// load/store at a given PC accessed last time (the PC-based way-prediction
// table reused for wakeup prediction). It is read with the PC of the
// instruction being fetched, so that the prediction is known in the decode
// stage, and written with the PC, set and way of every access the data cache
// completes.
//
// Organisation: direct mapped, ENTRIES entries indexed by PC bits
// [2 +: log2(ENTRIES)] (instructions are taken as 4-byte aligned). An entry
// is {valid, set index (SET_W bits), way number (WAY_W bits)}: the set and way
// fields follow the document; the valid bit, cleared at reset, is this
// design's way of telling a table "hit" (an entry written by an earlier
// load/store) from an empty entry. There is no PC tag, so two PCs that share
// an index share an entry, as in the document's table of set/way pairs.
//
// Timing: the read is synchronous. When rd_en is high at a rising edge, the
// entry for rd_pc appears on rd_hit/rd_set/rd_way after that edge and stays
// there until the next read. A write (wr_en) takes effect at the same edge;
// a read of the entry being written in the same cycle returns the old
// contents.
module ew_pred_table #(
  parameter int unsigned ENTRIES = ew_pkg::PT_ENTRIES,
  parameter int unsigned ADDR_W  = ew_pkg::ADDR_W,
  parameter int unsigned SET_W   = ew_pkg::SET_W,
  parameter int unsigned WAY_W   = ew_pkg::WAY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch-stage lookup
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_pc,
  output logic              rd_hit,
  output logic [SET_W-1:0]  rd_set,
  output logic [WAY_W-1:0]  rd_way,
  // update from completed data cache accesses
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_pc,
  input  logic [SET_W-1:0]  wr_set,
  input  logic [WAY_W-1:0]  wr_way
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]     valid_q;
  logic [SET_W-1:0]       set_mem [ENTRIES];
  logic [WAY_W-1:0]       way_mem [ENTRIES];

  logic [IDX_W-1:0] rd_idx, wr_idx;
  assign rd_idx = rd_pc[2 +: IDX_W];
  assign wr_idx = wr_pc[2 +: IDX_W];

  // Valid bits: reset to empty.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (wr_en) begin
      valid_q[wr_idx] <= 1'b1;
    end
  end

  // Set/way storage: plain memory, no reset needed (guarded by valid).
  always_ff @(posedge clk) begin
    if (wr_en) begin
      set_mem[wr_idx] <= wr_set;
      way_mem[wr_idx] <= wr_way;
    end
  end

  // Synchronous read port.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_hit <= 1'b0;
      rd_set <= '0;
      rd_way <= '0;
    end else if (rd_en) begin
      rd_hit <= valid_q[rd_idx];
      rd_set <= set_mem[rd_idx];
      rd_way <= way_mem[rd_idx];
    end
  end

endmodule
