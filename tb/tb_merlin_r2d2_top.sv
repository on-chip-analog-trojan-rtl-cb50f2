// tb_merlin_r2d2_top: end-to-end test of the detection slice at its default
// parameters, with a 150 MHz clock.
//
// The testbench plays the processor. It runs the Trojan trigger program: R0 is
// cleared, then CPSR_J is written 0 and 1 alternately by MSR, 200 times, at
// 20 MHz (one write every 3.75 cycles on average), and R0 is read back.
//  1. Detection on: unit 0 must raise IRQ 15 once 64 changes of CPSR_J fall
//     in one 256-cycle window, before the Trojan fires. The "interrupt handler"
//     stops the program, finds R0 still 0, and clears the interrupt.
//  2. An unprivileged attempt to switch detection off is refused.
//  3. Detection off (privileged write): the Trojan fires after about 180
//     rising edges of CPSR_J, R0 becomes 1 and no interrupt is raised.
//  4. Configurable scope on unit 1: slots are configured, slow benign
//     activity on the CPSR flags gives no alarm, then a fast-toggling external
//     wire (e.g. the branch-prediction enable) in group 0 and then in group 1
//     is caught while the groups take turns on the shared detector.
//  5. Unit 1 is reprogrammed and its registers read back.
// Each mechanism is counted and must have happened at least once.
`timescale 1ns/1ps
module tb_merlin_r2d2_top;
  import r2d2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic msr_we = 0, nzcv_we = 0, q_set = 0, ge_we = 0;
  logic [3:0] msr_mask = '0, nzcv = '0, ge = '0;
  logic [31:0] msr_wdata = '0, cpsr;
  logic rf_we = 0;
  logic [3:0] rf_waddr = '0, rf_raddr = '0;
  logic [31:0] rf_wdata = '0, rf_rdata;
  logic [3:0] ext_cand = '0;
  logic cfg_req = 0, cfg_we = 0, cfg_priv = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic cfg_err;
  logic trojan_en = 1'b1, trojan_trig_n;
  logic [1:0] detect_n;
  logic       scope_grp, scope_grp_q = 1'b0;
  logic irq15;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_det0 = 0, n_det1 = 0, n_trojan = 0, n_payload = 0, n_refused = 0;
  int n_irq_clear = 0, n_tdm_switch = 0, n_reprogram = 0;
  int j_changes = 0, j_rises = 0;

  always #3.333 clk = ~clk;   // 150 MHz

  merlin_r2d2_top dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (!detect_n[0]) n_det0++;
    if (!detect_n[1]) n_det1++;
    if (scope_grp != scope_grp_q) n_tdm_switch++;
    scope_grp_q <= scope_grp;
  end
  always @(negedge trojan_trig_n) n_trojan++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg_wr(input logic [CFG_AW-1:0] a, input logic [31:0] d, input bit priv = 1);
    @(negedge clk);
    cfg_req = 1; cfg_we = 1; cfg_priv = priv; cfg_addr = a; cfg_wdata = d;
    #0.5 if (!priv && cfg_err) n_refused++;
    @(negedge clk);
    cfg_req = 0; cfg_we = 0; cfg_priv = 0;
  endtask

  task automatic cfg_rd(input logic [CFG_AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    cfg_req = 1; cfg_we = 0; cfg_addr = a;
    #0.5 d = cfg_rdata;
    @(negedge clk);
    cfg_req = 0;
  endtask

  task automatic rf_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); rf_we = 1; rf_waddr = a; rf_wdata = d;
    @(negedge clk); rf_we = 0;
  endtask

  task automatic rf_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); rf_raddr = a; #0.5 d = rf_rdata;
  endtask

  // MSR CPSR_f with only J changed, then wait so that writes come every
  // 4, 4, 4, 3 cycles (20 MHz of J at 150 MHz).
  task automatic write_j(input bit j, input int gap);
    @(negedge clk);
    msr_we = 1; msr_mask = 4'b1000;
    msr_wdata = (cpsr & ~(32'd1 << CPSR_J)) | (32'(j) << CPSR_J);
    if (cpsr[CPSR_J] != j) begin j_changes++; if (j) j_rises++; end
    @(negedge clk);
    msr_we = 0;
    repeat (gap - 2) @(negedge clk);
  endtask

  // The trigger program: 200 iterations of J <- 0, J <- 1; stops early on IRQ.
  task automatic trigger_loop(output bit interrupted);
    int k = 0;
    interrupted = 0;
    for (int i = 0; i < 200 && !interrupted; i++) begin
      write_j(0, (k % 4 == 3) ? 3 : 4); k++;
      write_j(1, (k % 4 == 3) ? 3 : 4); k++;
      if (irq15) interrupted = 1;
    end
    write_j(0, 4);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bit intr;
    int changes_at_irq, rises_at_fire, det1_before, sw_before;

    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_rd(ADDR_UNIT + 0, d); check(d == 32'd255, "unit 0 MTW resets to T_m-1 = 255");
    cfg_rd(ADDR_UNIT + 1, d); check(d == 32'd63,  "unit 0 AT resets to A_th-1 = 63");
    cfg_rd(ADDR_CTRL, d);     check(d == 32'd3,   "both units enabled at reset");
    check(cpsr == 32'h10 && trojan_trig_n && detect_n == 2'b11 && !irq15, "quiet after reset");

    // ---- 1. Trigger program with detection on ----
    rf_write(0, 0);
    j_changes = 0; j_rises = 0;
    trigger_loop(intr);
    changes_at_irq = j_changes;
    check(intr, "IRQ 15 interrupts the trigger program");
    check(n_det0 > 0, "unit 0 alarmed");
    check(changes_at_irq >= 64 && changes_at_irq <= 64 + 68 + 2,
          $sformatf("alarm after %0d changes of CPSR_J (64..134 expected)", changes_at_irq));
    check(n_trojan == 0 && trojan_trig_n, "Trojan did not fire");
    rf_read(0, d); check(d == 32'd0, "R0 still 0: attack prevented");
    cfg_rd(ADDR_STATUS, d); check(d == 32'b011, "status: pending, unit 0 fired");
    cfg_wr(ADDR_STATUS, 32'h7);
    if (!irq15) n_irq_clear++;
    check(!irq15, "handler clears IRQ 15");
    repeat (30000) @(negedge clk);   // C_main leaks back to empty (200 us)

    // ---- 2. Unprivileged disable attempt ----
    cfg_wr(ADDR_CTRL, 32'd0, 0);
    cfg_rd(ADDR_CTRL, d);
    check(n_refused == 1 && d == 32'd3, "unprivileged software cannot disable detection");

    // ---- 3. Detection off: the Trojan fires ----
    cfg_wr(ADDR_CTRL, 32'd2);
    rf_write(0, 0);
    j_changes = 0; j_rises = 0;
    fork
      begin @(negedge trojan_trig_n); rises_at_fire = j_rises; end
    join_none
    trigger_loop(intr);
    check(!intr && !irq15, "no interrupt with unit 0 off");
    check(n_trojan > 0, "Trojan fired");
    check(rises_at_fire >= 175 && rises_at_fire <= 185,
          $sformatf("Trojan fired after %0d rising edges of CPSR_J (about 180)", rises_at_fire));
    repeat (4) @(negedge clk);
    rf_read(0, d);
    if (d == 32'd1) n_payload++;
    check(d == 32'd1, "payload: R0 changed from 0 to 1");
    wait (trojan_trig_n);
    check(1'b1, "trigger output released after the toggling stops");
    cfg_wr(ADDR_CTRL, 32'd3);
    repeat (30000) @(negedge clk);

    // ---- 4. Scope unit 1 ----
    // group 0: N, Z, C, ext0 ; group 1: S, GE0, ext1, Q
    cfg_wr(ADDR_SCOPE + 0, 32'd0);
    cfg_wr(ADDR_SCOPE + 1, 32'd1);
    cfg_wr(ADDR_SCOPE + 2, 32'd2);
    cfg_wr(ADDR_SCOPE + 3, 32'd11);
    cfg_wr(ADDR_SCOPE + 4, 32'd6);
    cfg_wr(ADDR_SCOPE + 5, 32'd7);
    cfg_wr(ADDR_SCOPE + 6, 32'd12);
    cfg_wr(ADDR_SCOPE + 7, 32'd4);
    cfg_rd(ADDR_SCOPE + 3, d); check(d == 32'd11, "scope slot 3 read back");
    // benign: a flag update every 50 cycles, ext wires toggling every 100
    det1_before = n_det1;
    for (int i = 0; i < 80; i++) begin
      @(negedge clk); nzcv_we = 1; nzcv = 4'($urandom); ge_we = (i % 7 == 0); ge = 4'($urandom);
      @(negedge clk); nzcv_we = 0; ge_we = 0;
      if (i % 2 == 0) ext_cand = ext_cand ^ 4'b0011;
      repeat (48) @(negedge clk);
    end
    check(n_det1 == det1_before && !irq15, "benign activity gives no alarm on the scope");
    // attack on ext0 (group 0): a change every 2 cycles
    sw_before = n_tdm_switch;
    for (int i = 0; i < 400 && !irq15; i++) begin
      @(negedge clk); ext_cand[0] = ~ext_cand[0];
      @(negedge clk);
    end
    check(irq15 && n_det1 > det1_before, "fast wire in group 0 caught by unit 1");
    cfg_rd(ADDR_STATUS, d); check(d == 32'b101, "status: pending, unit 1 fired");
    check(scope_grp == 1'b0 || n_tdm_switch > sw_before, "alarm while group 0 was watched");
    cfg_wr(ADDR_STATUS, 32'h7);
    if (!irq15) n_irq_clear++;
    // attack on ext1 (group 1)
    det1_before = n_det1;
    for (int i = 0; i < 800 && !irq15; i++) begin
      @(negedge clk); ext_cand[1] = ~ext_cand[1];
      @(negedge clk);
    end
    check(irq15 && n_det1 > det1_before, "fast wire in group 1 caught by unit 1");
    check(scope_grp == 1'b1, "group 1 was on the detector");
    check(n_tdm_switch > sw_before, "groups took turns");
    cfg_wr(ADDR_STATUS, 32'h7);
    if (!irq15) n_irq_clear++;

    // ---- 5. Reprogram unit 1 ----
    cfg_wr(ADDR_UNIT + 2, 32'd63);
    cfg_wr(ADDR_UNIT + 3, 32'd7);
    cfg_rd(ADDR_UNIT + 2, d); check(d == 32'd63, "unit 1 MTW reprogrammed");
    cfg_rd(ADDR_UNIT + 3, d); check(d == 32'd7, "unit 1 AT reprogrammed");
    if (d == 32'd7) n_reprogram++;
    det1_before = n_det1;
    for (int i = 0; i < 200 && !irq15; i++) begin
      @(negedge clk); ext_cand[0] = ~ext_cand[0];
      repeat (5) @(negedge clk);
    end
    check(n_det1 > det1_before, "reprogrammed unit 1 alarms at its new threshold");

    // ---- mechanisms ----
    check(n_det0 > 0,       "mechanism: unit 0 detection");
    check(n_det1 > 0,       "mechanism: unit 1 detection through the scope");
    check(n_trojan > 0,     "mechanism: Trojan activation");
    check(n_payload > 0,    "mechanism: R0 payload");
    check(n_refused > 0,    "mechanism: unprivileged write refused");
    check(n_irq_clear > 0,  "mechanism: IRQ 15 cleared by the handler");
    check(n_tdm_switch > 0, "mechanism: time-multiplex switch");
    check(n_reprogram > 0,  "mechanism: window/threshold reprogrammed");
    $display("mechanisms: det0=%0d det1=%0d trojan=%0d payload=%0d refused=%0d irq_clear=%0d tdm_switch=%0d reprogram=%0d",
             n_det0, n_det1, n_trojan, n_payload, n_refused, n_irq_clear, n_tdm_switch, n_reprogram);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
