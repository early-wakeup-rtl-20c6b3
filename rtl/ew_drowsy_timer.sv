// ew_drowsy_timer: global sleep policy of the conventional drowsy cache.
//
// Lines that have not been used recently should be put into drowsy mode.
// This design uses the simple periodic policy of the original drowsy cache:
// a free-running counter asserts "sleep_all" for one cycle every WINDOW
// cycles, and every line of the cache is then put into drowsy mode; lines in
// use are woken again on demand or by the early wakeup. The choice of policy
// and the default window of 4000 cycles are this design's, not the
// document's, which only says that rarely used lines are made drowsy.
//
// Interface and timing: "sleep_all" is high in the cycle in which the counter
// reaches WINDOW-1, i.e. in cycles WINDOW-1, 2*WINDOW-1, ... after reset,
// while "enable" is high. With "enable" low the counter holds and no sleep is
// issued (all lines stay in whatever mode they are in).
module ew_drowsy_timer #(
  parameter int unsigned WINDOW = ew_pkg::DROWSY_WINDOW
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic sleep_all
);

  localparam int unsigned CNT_W = (WINDOW > 1) ? $clog2(WINDOW) : 1;

  logic [CNT_W-1:0] cnt_q;
  logic             last;

  assign last = (cnt_q == CNT_W'(WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else if (enable) begin
      cnt_q <= last ? '0 : cnt_q + 1'b1;
    end
  end

  assign sleep_all = enable && last;

endmodule
