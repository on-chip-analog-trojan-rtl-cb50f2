// merlin_r2d2_top: the security slice of the demonstration processor, with
// an A2-style analog Trojan inserted and the runtime toggle-rate detection
// that catches it.
//
// What is inside:
//  * cpsr_reg and core_regs: the parts of the processor the attack uses. The
//    Trojan's trigger input is CPSR_J, a bit software can flip with MSR but
//    that normal code never touches; its payload forces R0 to 1.
//  * a2_trojan: behavioural model of the analog trigger, fed by CPSR_J;
//    its active-low output is brought out (it drives a GPIO pin on the chip).
//  * Detection unit 0: one r2d2_detector guarding CPSR_J directly with
//    T_m = 256 cycles and A_th = 64 events, the configuration of the chip.
//  * Detection unit 1: the configurable monitoring scope. scope_mux_tree picks
//    NUM_SLOTS wires out of the CPSR flags (N Z C V Q J S GE[3:0]) and NUM_EXT
//    other low-toggling core wires (for instance the branch-prediction enable
//    or prefetch-hint signals); the slots are XORed in NUM_GROUPS groups
//    (toggle_xor) and the groups take turns, one window each, on a shared
//    detector (guard_tdm); scope_grp shows which group it is watching.
//    Its reset window and threshold are halved.
//  * r2d2_csr: privileged configuration registers and IRQ 15.
//
// The processor itself is not part of this design: its MSR and flag writes,
// register file ports and candidate wires are top-level ports. Slot, group and
// external-wire counts, and unit 1's reset settings, are this design's
// choices; unit 0's settings, CPSR_J as trigger, R0 as payload and IRQ 15 come
// from the demonstration chip. All state resets asynchronously on rst_n low.
`timescale 1ns/1ps
module merlin_r2d2_top
  import r2d2_pkg::*;
#(
  parameter int unsigned NUM_EXT    = 4,
  parameter int unsigned NUM_SLOTS  = 8,
  parameter int unsigned NUM_GROUPS = 2,
  parameter int unsigned T_M0       = 256,
  parameter int unsigned A_TH0      = 64,
  parameter int unsigned T_M1       = 128,
  parameter int unsigned A_TH1      = 32,
  parameter int unsigned NCAND      = 11 + NUM_EXT,
  parameter int unsigned SELW       = $clog2(NCAND + 1),
  parameter int unsigned GSELW      = (NUM_GROUPS > 1) ? $clog2(NUM_GROUPS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // status register updates from the core
  input  logic               msr_we,
  input  logic [3:0]         msr_mask,
  input  logic [31:0]        msr_wdata,
  input  logic               nzcv_we,
  input  logic [3:0]         nzcv,
  input  logic               q_set,
  input  logic               ge_we,
  input  logic [3:0]         ge,
  output logic [31:0]        cpsr,
  // core registers
  input  logic               rf_we,
  input  logic [3:0]         rf_waddr,
  input  logic [31:0]        rf_wdata,
  input  logic [3:0]         rf_raddr,
  output logic [31:0]        rf_rdata,
  // other core wires offered to the monitoring scope
  input  logic [NUM_EXT-1:0] ext_cand,
  // privileged configuration bus
  input  logic               cfg_req,
  input  logic               cfg_we,
  input  logic               cfg_priv,
  input  logic [CFG_AW-1:0]  cfg_addr,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  output logic               cfg_err,
  // analog Trojan
  input  logic               trojan_en,
  output logic               trojan_trig_n,
  // detection
  output logic [1:0]         detect_n,
  output logic [GSELW-1:0]   scope_grp,
  output logic               irq15
);

  localparam int unsigned CW = 8;
  localparam int unsigned TW = 6;
  localparam int unsigned GS = NUM_SLOTS / NUM_GROUPS;

  // ---------------- processor state used by the attack ----------------
  cpsr_reg u_cpsr (
    .clk, .rst_n, .msr_we, .msr_mask, .msr_wdata,
    .nzcv_we, .nzcv, .q_set, .ge_we, .ge, .cpsr
  );

  logic payload_sync;
  core_regs u_regs (
    .clk, .rst_n,
    .we (rf_we), .waddr (rf_waddr), .wdata (rf_wdata),
    .raddr (rf_raddr), .rdata (rf_rdata),
    .payload_n (trojan_trig_n), .payload_sync
  );

  // ---------------- inserted analog Trojan on CPSR_J ----------------
  a2_trojan u_a2 (
    .trigger_in    (cpsr[CPSR_J]),
    .enable        (trojan_en),
    .trigger_out_n (trojan_trig_n)
  );

  // ---------------- configuration ----------------
  logic [1:0]                     unit_en, mtw_we, at_we;
  logic [31:0]                    wdata;
  logic [1:0][31:0]               mtw_rb, at_rb;
  logic [NUM_SLOTS-1:0][SELW-1:0] scope_sel;

  r2d2_csr #(.NUM_UNITS(2), .NUM_SLOTS(NUM_SLOTS), .SELW(SELW)) u_csr (
    .clk, .rst_n, .cfg_req, .cfg_we, .cfg_priv, .cfg_addr, .cfg_wdata,
    .cfg_rdata, .cfg_err, .unit_en, .mtw_we, .at_we, .wdata,
    .mtw_rb, .at_rb, .alarm_n (detect_n), .scope_sel, .irq (irq15)
  );

  // ---------------- unit 0: CPSR_J ----------------
  logic [CW-1:0] mtw0_q, mtw1_q;
  logic [TW-1:0] at0_q, at1_q;
  logic          win_end0, win_end1;

  r2d2_detector #(.CLK_CNT_W(CW), .TOG_CNT_W(TW), .T_M_RESET(T_M0), .A_TH_RESET(A_TH0)) u_det0 (
    .clk, .rst_n, .en (unit_en[0]), .guard (cpsr[CPSR_J]), .hold (1'b0),
    .mtw_we (mtw_we[0]), .mtw_wdata (wdata[CW-1:0]),
    .at_we (at_we[0]), .at_wdata (wdata[TW-1:0]),
    .mtw_q (mtw0_q), .at_q (at0_q), .win_end (win_end0), .detect_n (detect_n[0])
  );

  // ---------------- unit 1: configurable scope ----------------
  logic [NCAND-1:0]      cand;
  logic [NUM_SLOTS-1:0]  slot;
  logic [NUM_GROUPS-1:0] grp;
  logic                  guard1, switched;

  assign cand = {ext_cand, cpsr[CPSR_GE +: 4], cpsr[CPSR_S], cpsr[CPSR_J],
                 cpsr[CPSR_Q], cpsr[CPSR_V], cpsr[CPSR_C], cpsr[CPSR_Z], cpsr[CPSR_N]};

  scope_mux_tree #(.NCAND(NCAND), .NSLOTS(NUM_SLOTS), .SELW(SELW)) u_scope (
    .cand, .sel (scope_sel), .slot
  );

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_grp
    toggle_xor #(.N(GS)) u_xor (.sig (slot[g*GS +: GS]), .guard (grp[g]));
  end

  guard_tdm #(.G(NUM_GROUPS)) u_tdm (
    .clk, .rst_n, .grp, .win_end (win_end1), .guard (guard1), .sel (scope_grp), .switched
  );

  r2d2_detector #(.CLK_CNT_W(CW), .TOG_CNT_W(TW), .T_M_RESET(T_M1), .A_TH_RESET(A_TH1)) u_det1 (
    .clk, .rst_n, .en (unit_en[1]), .guard (guard1), .hold (switched),
    .mtw_we (mtw_we[1]), .mtw_wdata (wdata[CW-1:0]),
    .at_we (at_we[1]), .at_wdata (wdata[TW-1:0]),
    .mtw_q (mtw1_q), .at_q (at1_q), .win_end (win_end1), .detect_n (detect_n[1])
  );

  assign mtw_rb[0] = 32'(mtw0_q);
  assign mtw_rb[1] = 32'(mtw1_q);
  assign at_rb[0]  = 32'(at0_q);
  assign at_rb[1]  = 32'(at1_q);

  initial assert (NUM_SLOTS % NUM_GROUPS == 0) else $error("NUM_SLOTS must divide into NUM_GROUPS");

endmodule
