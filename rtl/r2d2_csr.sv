// r2d2_csr: privileged configuration and interrupt registers of the
// detection units.
//
// The detection scheme only resists an attacker who can run code if its
// settings cannot be changed from unprivileged software. This block decodes
// a simple register bus, accepts writes only when cfg_priv is set (other
// writes are dropped and flagged on cfg_err), and leaves reads open so the
// units can be tested after fabrication by reading back what was written.
// It holds the unit enables, the scope selections and the IRQ 15 pending flag;
// the MTW and AT registers themselves live in the detection units, which get
// write strobes and the write data from here and return their contents.
//
// Register map: see r2d2_pkg. A unit whose detection output goes low sets
// STATUS bit 1+u and the pending bit 0; irq follows the pending bit until
// software writes 1 to it. A set and a clear in the same cycle leave the bit
// set. The bus, the map and the pending flag are this design's choices.
//
// Timing: writes take effect on the next clock edge; cfg_rdata and cfg_err
// are combinational in the cycle of the access (cfg_req high).
`timescale 1ns/1ps
module r2d2_csr
  import r2d2_pkg::*;
#(
  parameter int unsigned NUM_UNITS = 2,
  parameter int unsigned NUM_SLOTS = 8,
  parameter int unsigned SELW      = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // register bus
  input  logic                           cfg_req,
  input  logic                           cfg_we,
  input  logic                           cfg_priv,
  input  logic [CFG_AW-1:0]              cfg_addr,
  input  logic [31:0]                    cfg_wdata,
  output logic [31:0]                    cfg_rdata,
  output logic                           cfg_err,
  // detection units
  output logic [NUM_UNITS-1:0]           unit_en,
  output logic [NUM_UNITS-1:0]           mtw_we,
  output logic [NUM_UNITS-1:0]           at_we,
  output logic [31:0]                    wdata,
  input  logic [NUM_UNITS-1:0][31:0]     mtw_rb,
  input  logic [NUM_UNITS-1:0][31:0]     at_rb,
  input  logic [NUM_UNITS-1:0]           alarm_n,
  // scope
  output logic [NUM_SLOTS-1:0][SELW-1:0] scope_sel,
  // interrupt request 15
  output logic                           irq
);

  logic                 wr;
  logic [NUM_UNITS-1:0] fired;
  logic                 pending;

  assign wr      = cfg_req && cfg_we && cfg_priv;
  assign cfg_err = cfg_req && cfg_we && !cfg_priv;
  assign wdata   = cfg_wdata;
  assign irq     = pending;

  always_comb begin
    for (int u = 0; u < NUM_UNITS; u++) begin
      mtw_we[u] = wr && (cfg_addr == CFG_AW'(int'(ADDR_UNIT) + 2*u));
      at_we[u]  = wr && (cfg_addr == CFG_AW'(int'(ADDR_UNIT) + 2*u + 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      unit_en   <= '1;
      fired     <= '0;
      pending   <= 1'b0;
      scope_sel <= '1;   // every slot off: all-ones selects a zero leaf
    end else begin
      if (wr && cfg_addr == ADDR_CTRL) unit_en <= cfg_wdata[NUM_UNITS-1:0];
      for (int s = 0; s < NUM_SLOTS; s++)
        if (wr && cfg_addr == CFG_AW'(int'(ADDR_SCOPE) + s)) scope_sel[s] <= cfg_wdata[SELW-1:0];
      if (wr && cfg_addr == ADDR_STATUS) begin
        pending <= pending & ~cfg_wdata[0];
        fired   <= fired & ~cfg_wdata[NUM_UNITS:1];
      end
      if (!(&alarm_n)) begin
        pending <= 1'b1;
        fired   <= fired | ~alarm_n;
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == ADDR_CTRL)   cfg_rdata[NUM_UNITS-1:0] = unit_en;
    if (cfg_addr == ADDR_STATUS) cfg_rdata[NUM_UNITS:0]   = {fired, pending};
    for (int u = 0; u < NUM_UNITS; u++) begin
      if (cfg_addr == CFG_AW'(int'(ADDR_UNIT) + 2*u))     cfg_rdata = mtw_rb[u];
      if (cfg_addr == CFG_AW'(int'(ADDR_UNIT) + 2*u + 1)) cfg_rdata = at_rb[u];
    end
    for (int s = 0; s < NUM_SLOTS; s++)
      if (cfg_addr == CFG_AW'(int'(ADDR_SCOPE) + s)) cfg_rdata[SELW-1:0] = scope_sel[s];
  end

  initial begin
    assert (int'(ADDR_UNIT) + 2*NUM_UNITS <= int'(ADDR_SCOPE) && int'(ADDR_SCOPE) + NUM_SLOTS <= (1 << CFG_AW))
      else $error("register map overlaps");
  end

  // An unprivileged write never changes the enables.
  a_no_unpriv_disable: assert property (@(posedge clk) disable iff (!rst_n)
                                        (cfg_req && cfg_we && !cfg_priv) |=> unit_en == $past(unit_en));

endmodule
