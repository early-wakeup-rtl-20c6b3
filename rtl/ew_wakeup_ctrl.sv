// ew_wakeup_ctrl: decides and issues the early wakeup of a data cache line.
//
// The prediction table is read in the fetch stage; its entry is known in the
// decode stage, where it also becomes known whether the instruction is a
// load or store. If it is, and the table lookup hit, the predicted line
// (set index and way number) is woken through the data cache's separate
// wakeup port. Otherwise nothing happens and the cache behaves as a
// conventional drowsy cache. "enable" low turns the mechanism off (the
// conventional drowsy cache, for comparison).
//
// Timing: de_new is high for exactly one cycle per instruction, the first
// cycle it spends in decode, with de_is_mem and the table outputs valid in
// that cycle. The request is registered and appears on wk_valid/wk_set/
// wk_way for one cycle, the cycle after decode (the issue stage). A line
// woken then is accessible WAKE_CYCLES cycles later, which is before the
// memory stage whenever there are more than WAKE_CYCLES stages between fetch
// and memory access. The decision rule follows the document; registering the
// request at the end of decode is this design's reading of the pipeline
// figure.
module ew_wakeup_ctrl #(
  parameter int unsigned SET_W = ew_pkg::SET_W,
  parameter int unsigned WAY_W = ew_pkg::WAY_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // decode stage
  input  logic             de_new,
  input  logic             de_is_mem,
  input  logic             pt_hit,
  input  logic [SET_W-1:0] pt_set,
  input  logic [WAY_W-1:0] pt_way,
  // wakeup port of the data cache
  output logic             wk_valid,
  output logic [SET_W-1:0] wk_set,
  output logic [WAY_W-1:0] wk_way
);

  logic fire;
  assign fire = enable && de_new && de_is_mem && pt_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wk_valid <= 1'b0;
      wk_set   <= '0;
      wk_way   <= '0;
    end else begin
      wk_valid <= fire;
      if (fire) begin
        wk_set <= pt_set;
        wk_way <= pt_way;
      end
    end
  end

endmodule
