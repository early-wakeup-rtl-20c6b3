// ew_line_pwr_ctrl: power-mode control of one drowsy cache line.
//
// A drowsy line keeps its data at a reduced supply but cannot be read or
// written. Raising the supply ("active" = 1, the control input of the
// super-drowsy line circuit) takes WAKE_CYCLES cycles, after which the line
// is accessible ("awake" = 1). A sleep command drops the supply again.
//
// Interface and timing:
//   wake   - level or pulse. Sampled at a rising edge while the line is
//            drowsy, it starts the wakeup; "awake" rises exactly WAKE_CYCLES
//            edges later. A wakeup in progress completes on its own.
//   sleep  - sampled at a rising edge, returns the line to drowsy mode on the
//            next cycle, unless "wake" is asserted in the same cycle (wake
//            wins, so a line that is being accessed is never put to sleep
//            under the access).
//   active - supply at nominal (waking or awake).
//   awake  - line accessible.
// Reset puts the line in drowsy mode.
// The wakeup latency and the drowsy/normal modes follow the document; the
// wake-over-sleep priority and the reset state are this design's choices.
module ew_line_pwr_ctrl #(
  parameter int unsigned WAKE_CYCLES = ew_pkg::WAKE_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wake,
  input  logic sleep,
  output logic active,
  output logic awake
);

  localparam int unsigned CNT_W = (WAKE_CYCLES > 1) ? $clog2(WAKE_CYCLES + 1) : 1;

  ew_pkg::line_mode_e mode_q;
  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= ew_pkg::LINE_DROWSY;
      cnt_q  <= '0;
    end else begin
      unique case (mode_q)
        ew_pkg::LINE_DROWSY: begin
          if (wake) begin
            if (WAKE_CYCLES <= 1) begin
              mode_q <= ew_pkg::LINE_AWAKE;
            end else begin
              mode_q <= ew_pkg::LINE_WAKING;
              cnt_q  <= CNT_W'(WAKE_CYCLES - 1);
            end
          end
        end
        ew_pkg::LINE_WAKING: begin
          if (sleep && !wake) begin
            mode_q <= ew_pkg::LINE_DROWSY;
          end else begin
            cnt_q <= cnt_q - 1'b1;
            if (cnt_q == CNT_W'(1)) mode_q <= ew_pkg::LINE_AWAKE;
          end
        end
        ew_pkg::LINE_AWAKE: begin
          if (sleep && !wake) mode_q <= ew_pkg::LINE_DROWSY;
        end
        default: mode_q <= ew_pkg::LINE_DROWSY;
      endcase
    end
  end

  assign active = (mode_q != ew_pkg::LINE_DROWSY);
  assign awake  = (mode_q == ew_pkg::LINE_AWAKE);

endmodule
