// guard_tdm: time-multiplexes G guarded groups onto one detection unit.
//
// Instead of one detection unit per XOR group, the groups take turns: the
// group in use changes round-robin at the end of every monitoring window
// (win_end from the detection unit), so each group is watched for one window
// in every G. The window length and threshold of the shared unit should be
// reduced accordingly. The round-robin schedule and the one-per-window slot
// are this design's choices.
//
// Timing: sel changes on the clock edge that ends a window; switched is high
// for the first cycle of the new window so the detection unit can ignore the
// level step caused by the change of group.
`timescale 1ns/1ps
module guard_tdm #(
  parameter int unsigned G    = 2,
  parameter int unsigned SELW = (G > 1) ? $clog2(G) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [G-1:0]    grp,
  input  logic            win_end,
  output logic            guard,
  output logic [SELW-1:0] sel,
  output logic            switched
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= '0;
      switched <= 1'b0;
    end else begin
      switched <= win_end && (G > 1);
      if (win_end) sel <= (sel == SELW'(G - 1)) ? '0 : sel + 1'b1;
    end
  end

  always_comb guard = grp[sel];

endmodule
