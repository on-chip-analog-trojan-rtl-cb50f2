// r2d2_detector: runtime toggle-rate detection unit for one guarded signal.
//
// An analog trigger of the A2 kind only fires after its input has toggled
// often for a while. This unit counts the toggle events of one guarded signal
// inside a monitoring timing window and raises an alarm as soon as the count in
// one window reaches the attack threshold. Both window length and threshold
// sit in registers (MTW and AT) that privileged software can rewrite.
//
// Structure (as in the published detection circuit): a clock counter compared
// with the MTW register ends each window and clears the toggle event counter;
// the toggle event counter is compared with the AT register to drive the
// active-low detection output.
//
// Design choices of this implementation:
//  * MTW holds T_m - 1 and AT holds A_th - 1, so T_m = 256 and A_th = 64 fit
//    the 8-bit clock counter and 6-bit toggle counter.
//  * A toggle event is any change of level of the guarded signal.
//  * detect_n is registered: it is low for one cycle, the cycle after the
//    toggle that makes the A_th-th event of the current window. The counter
//    keeps counting afterwards, so a sustained attack raises it again.
//  * Writing MTW or AT, or clearing en, restarts the window with empty counts.
//  * hold ignores the guarded signal for one cycle (used when a multiplexer in
//    front of the unit switches to another group of wires).
//
// Timing: one clock; a window is exactly T_m cycles, win_end is high in its
// last cycle. Reset values are T_m = T_M_RESET and A_th = A_TH_RESET.
`timescale 1ns/1ps
module r2d2_detector #(
  parameter int unsigned CLK_CNT_W  = 8,
  parameter int unsigned TOG_CNT_W  = 6,
  parameter int unsigned T_M_RESET  = 256,
  parameter int unsigned A_TH_RESET = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 guard,
  input  logic                 hold,
  input  logic                 mtw_we,
  input  logic [CLK_CNT_W-1:0] mtw_wdata,
  input  logic                 at_we,
  input  logic [TOG_CNT_W-1:0] at_wdata,
  output logic [CLK_CNT_W-1:0] mtw_q,
  output logic [TOG_CNT_W-1:0] at_q,
  output logic                 win_end,
  output logic                 detect_n
);

  localparam logic [CLK_CNT_W-1:0] MTW_INIT = CLK_CNT_W'(T_M_RESET - 1);
  localparam logic [TOG_CNT_W-1:0] AT_INIT  = TOG_CNT_W'(A_TH_RESET - 1);

  logic [CLK_CNT_W-1:0] clk_cnt;   // "a" in the detection circuit
  logic [TOG_CNT_W-1:0] tog_cnt;   // "c"
  logic                 guard_q;
  logic                 armed;     // guard_q holds a valid sample
  logic                 toggle;
  logic                 restart;

  assign win_end = en && (clk_cnt == mtw_q);
  assign toggle  = en && armed && !hold && (guard != guard_q);
  assign restart = !en || mtw_we || at_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mtw_q    <= MTW_INIT;
      at_q     <= AT_INIT;
      clk_cnt  <= '0;
      tog_cnt  <= '0;
      guard_q  <= 1'b0;
      armed    <= 1'b0;
      detect_n <= 1'b1;
    end else begin
      guard_q <= guard;
      armed   <= 1'b1;
      if (mtw_we) mtw_q <= mtw_wdata;
      if (at_we)  at_q  <= at_wdata;
      if (restart) begin
        clk_cnt  <= '0;
        tog_cnt  <= '0;
        detect_n <= 1'b1;
      end else begin
        clk_cnt  <= win_end ? '0 : clk_cnt + 1'b1;
        if (win_end)     tog_cnt <= '0;
        else if (toggle) tog_cnt <= tog_cnt + 1'b1;
        detect_n <= !(toggle && (tog_cnt == at_q));
      end
    end
  end

  initial begin
    assert (T_M_RESET >= 1 && T_M_RESET <= (1 << CLK_CNT_W))
      else $error("T_M_RESET does not fit the clock counter");
    assert (A_TH_RESET >= 1 && A_TH_RESET <= (1 << TOG_CNT_W))
      else $error("A_TH_RESET does not fit the toggle event counter");
  end

  // The alarm can only follow a cycle in which the unit was enabled.
  a_alarm_needs_en: assert property (@(posedge clk) disable iff (!rst_n)
                                     !detect_n |-> $past(en));

endmodule
