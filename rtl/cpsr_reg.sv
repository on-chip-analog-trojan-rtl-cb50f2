// cpsr_reg: current program status register of the processor.
//
// Stores the APSR flags N, Z, C, V (condition flags), Q (sticky saturation
// flag) and GE[3:0], plus two bits this processor gives its own use: S at
// CPSR[23], the superscalar/VLIW mode-switch flag, and J at CPSR[24], which
// has no function (no Jazelle support) but is stored and written by MSR. Both
// toggle rarely in normal code, which makes them candidate Trojan trigger
// inputs and therefore signals worth guarding. The mode field reads as user
// mode, the only mode this processor runs in; all other bits read 0.
//
// Updates: an MSR write uses the ARM field mask (msr_mask[3] = flags byte
// [31:24], [2] = status byte [23:16], [1] = extension byte [15:8], [0] =
// control byte [7:0]) and only touches stored bits; the execute units update
// NZCV and GE, and set Q. An MSR write in the same cycle wins over them
// (this design's choice). Registered output, reset to all stored bits 0.
`timescale 1ns/1ps
module cpsr_reg
  import r2d2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        msr_we,
  input  logic [3:0]  msr_mask,
  input  logic [31:0] msr_wdata,
  input  logic        nzcv_we,
  input  logic [3:0]  nzcv,
  input  logic        q_set,
  input  logic        ge_we,
  input  logic [3:0]  ge,
  output logic [31:0] cpsr
);

  logic [31:0] stored;
  logic [31:0] msr_bits;
  logic [31:0] next;

  assign msr_bits = {{8{msr_mask[3]}}, {8{msr_mask[2]}}, {8{msr_mask[1]}}, {8{msr_mask[0]}}}
                    & CPSR_STORED;

  always_comb begin
    next = stored;
    if (nzcv_we) next[CPSR_N:CPSR_V] = nzcv;
    if (q_set)   next[CPSR_Q] = 1'b1;
    if (ge_we)   next[CPSR_GE+3:CPSR_GE] = ge;
    if (msr_we)  next = (next & ~msr_bits) | (msr_wdata & msr_bits);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stored <= '0;
    else        stored <= next & CPSR_STORED;
  end

  assign cpsr = stored | {27'd0, MODE_USER};

endmodule
