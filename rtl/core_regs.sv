// core_regs: user-mode core registers R0-R12, SP and LR, with the payload of
// the demonstration Trojan on R0.
//
// The inserted analog Trojan proves it fired by changing R0 from 0 to 1, which
// software then reads back. Here that payload is a write port of higher
// priority than the core's: in every cycle in which the (synchronised) trigger
// output is active, R0 is written with 1. The trigger output comes from an
// analog circuit with no relation to the clock, so it passes a two-flop
// synchroniser first (payload_sync shows its state).
//
// Interface: one write port and one read port (this design's choice; the
// processor's real register file organisation is not modelled). Address 15
// (PC) and unused addresses read 0. Writes land on the clock edge; reads are
// combinational. All registers reset to 0.
`timescale 1ns/1ps
module core_regs #(
  parameter int unsigned NREGS = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [3:0]  raddr,
  output logic [31:0] rdata,
  input  logic        payload_n,
  output logic        payload_sync
);

  logic [NREGS-1:0][31:0] r;
  logic [1:0]             sync_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_n <= 2'b11;
    else        sync_n <= {sync_n[0], payload_n};
  end
  assign payload_sync = !sync_n[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      if (we && 32'(waddr) < NREGS) r[waddr] <= wdata;
      if (payload_sync)              r[0]     <= 32'd1;
    end
  end

  always_comb rdata = (32'(raddr) < NREGS) ? r[raddr] : '0;

endmodule
