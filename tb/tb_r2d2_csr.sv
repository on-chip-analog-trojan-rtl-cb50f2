// tb_r2d2_csr: privileged configuration registers and IRQ 15.
//
// Two units, 8 scope slots. Checks: reset values (both units on, every slot
// off, no interrupt); privileged writes to CTRL and the scope slots take
// effect and read back; MTW/AT writes produce one-cycle strobes for the right
// unit with the written data, and the units' values read back at their
// addresses; unprivileged writes are refused (cfg_err) and change nothing; an
// alarm sets pending/fired and raises irq until a privileged write-1-to-clear;
// an unprivileged clear attempt leaves irq set.
`timescale 1ns/1ps
module tb_r2d2_csr;
  import r2d2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_req = 0, cfg_we = 0, cfg_priv = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata, wdata;
  logic cfg_err;
  logic [1:0] unit_en, mtw_we, at_we;
  logic [1:0][31:0] mtw_rb, at_rb;
  logic [1:0] alarm_n = 2'b11;
  logic [7:0][3:0] scope_sel;
  logic irq;
  int checks = 0, failures = 0;
  int mtw_strobes[2], at_strobes[2];

  always #5 clk = ~clk;

  r2d2_csr #(.NUM_UNITS(2), .NUM_SLOTS(8), .SELW(4)) dut (.*);

  // Model of the MTW/AT registers inside the units.
  always_ff @(posedge clk) begin
    for (int u = 0; u < 2; u++) begin
      if (mtw_we[u]) begin mtw_rb[u] <= wdata; mtw_strobes[u]++; end
      if (at_we[u])  begin at_rb[u]  <= wdata; at_strobes[u]++;  end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [CFG_AW-1:0] a, input logic [31:0] d, input bit priv, output bit err);
    @(negedge clk);
    cfg_req = 1; cfg_we = 1; cfg_priv = priv; cfg_addr = a; cfg_wdata = d;
    #1 err = cfg_err;
    @(negedge clk);
    cfg_req = 0; cfg_we = 0; cfg_priv = 0;
  endtask

  task automatic rd(input logic [CFG_AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    cfg_req = 1; cfg_we = 0; cfg_addr = a;
    #1 d = cfg_rdata;
    @(negedge clk);
    cfg_req = 0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bit err;
    mtw_rb = '{32'd0, 32'd0};
    at_rb  = '{32'd0, 32'd0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(unit_en == 2'b11 && !irq, "reset: units on, no irq");
    for (int s = 0; s < 8; s++) check(scope_sel[s] == 4'hF, "reset: slot off");

    // Scope slots.
    for (int s = 0; s < 8; s++) wr(ADDR_SCOPE + 6'(s), 32'(s + 3), 1, err);
    for (int s = 0; s < 8; s++) begin
      rd(ADDR_SCOPE + 6'(s), d);
      check(d == 32'((s + 3) & 15) && scope_sel[s] == 4'((s + 3) & 15), $sformatf("slot %0d written", s));
    end

    // Unit registers.
    wr(ADDR_UNIT + 0, 32'd127, 1, err);
    wr(ADDR_UNIT + 1, 32'd31, 1, err);
    wr(ADDR_UNIT + 2, 32'd63, 1, err);
    wr(ADDR_UNIT + 3, 32'd15, 1, err);
    check(mtw_strobes[0] == 1 && at_strobes[0] == 1 && mtw_strobes[1] == 1 && at_strobes[1] == 1,
          "one strobe per unit register write");
    rd(ADDR_UNIT + 0, d); check(d == 32'd127, "unit 0 MTW read back");
    rd(ADDR_UNIT + 1, d); check(d == 32'd31,  "unit 0 AT read back");
    rd(ADDR_UNIT + 2, d); check(d == 32'd63,  "unit 1 MTW read back");
    rd(ADDR_UNIT + 3, d); check(d == 32'd15,  "unit 1 AT read back");

    // Unprivileged writes.
    wr(ADDR_CTRL, 32'd0, 0, err);
    check(err, "unprivileged write flagged");
    check(unit_en == 2'b11, "unprivileged write cannot disable detection");
    wr(ADDR_UNIT + 1, 32'd60, 0, err);
    check(at_strobes[0] == 1, "unprivileged AT write dropped");
    wr(ADDR_SCOPE, 32'd0, 0, err);
    rd(ADDR_SCOPE, d); check(d == 32'd3, "unprivileged scope write dropped");

    // Privileged enable write.
    wr(ADDR_CTRL, 32'd2, 1, err);
    check(!err && unit_en == 2'b10, "privileged write disables unit 0");
    rd(ADDR_CTRL, d); check(d == 32'd2, "CTRL read back");
    wr(ADDR_CTRL, 32'd3, 1, err);

    // Alarm from unit 1.
    @(negedge clk); alarm_n = 2'b01; @(negedge clk); alarm_n = 2'b11;
    check(irq, "alarm raises irq");
    rd(ADDR_STATUS, d); check(d == 32'b101, "status: pending, unit 1 fired");
    repeat (5) @(negedge clk);
    check(irq, "irq held");
    wr(ADDR_STATUS, 32'h7, 0, err);
    check(irq, "unprivileged clear refused");
    wr(ADDR_STATUS, 32'h7, 1, err);
    check(!irq, "privileged write-1-to-clear");
    rd(ADDR_STATUS, d); check(d == 32'b0, "status cleared");

    // Alarm from unit 0, clear pending only.
    @(negedge clk); alarm_n = 2'b10; @(negedge clk); alarm_n = 2'b11;
    wr(ADDR_STATUS, 32'h1, 1, err);
    rd(ADDR_STATUS, d); check(d == 32'b010 && !irq, "clear pending keeps fired bit");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
