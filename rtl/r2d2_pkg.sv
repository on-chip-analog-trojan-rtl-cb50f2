// r2d2_pkg: constants shared by the runtime Trojan-detection slice.
//
// Holds the CPSR bit positions of the ARMv7-A&R status register as this
// processor lays it out (the S bit at CPSR[23] is the processor's own
// superscalar/VLIW mode-switch flag), and the word address map of the
// privileged configuration registers of the detection units. The bit
// positions follow the architecture; the address map is this design's choice.
`timescale 1ns/1ps
package r2d2_pkg;

  // CPSR bit positions.
  localparam int unsigned CPSR_N  = 31;
  localparam int unsigned CPSR_Z  = 30;
  localparam int unsigned CPSR_C  = 29;
  localparam int unsigned CPSR_V  = 28;
  localparam int unsigned CPSR_Q  = 27;
  localparam int unsigned CPSR_J  = 24;
  localparam int unsigned CPSR_S  = 23;
  localparam int unsigned CPSR_GE = 16;  // GE[3:0] at [19:16]

  // Bits the processor stores: N Z C V Q, J, S and GE[3:0].
  localparam logic [31:0] CPSR_STORED = 32'hF98F_0000;
  // Mode field: the processor runs in user mode only.
  localparam logic [4:0]  MODE_USER   = 5'b10000;

  // Configuration register map (word addresses).
  //   CTRL    : bit u = enable of detection unit u
  //   STATUS  : bit 0 = IRQ 15 pending, bit 1+u = unit u has fired (write 1 to clear)
  //   UNIT    : UNIT_BASE + 2u = MTW of unit u (T_m - 1), +1 = AT of unit u (A_th - 1)
  //   SCOPE   : SCOPE_BASE + s = candidate selected by scope slot s
  localparam int unsigned CFG_AW          = 6;
  localparam logic [CFG_AW-1:0] ADDR_CTRL   = 6'h00;
  localparam logic [CFG_AW-1:0] ADDR_STATUS = 6'h01;
  localparam logic [CFG_AW-1:0] ADDR_UNIT   = 6'h02;
  localparam logic [CFG_AW-1:0] ADDR_SCOPE  = 6'h10;

endpackage
