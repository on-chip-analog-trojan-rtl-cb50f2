// tb_cpsr_reg: the status register. Checks: reset value (user mode only);
// MSR with the flags field writes N Z C V Q and J and nothing else in that
// byte; the status field writes S and GE; the extension and control fields
// write nothing; execute-unit NZCV/GE updates and the sticky Q set; an MSR in
// the same cycle overrides a flag update; and a random stream against a
// reference model.
`timescale 1ns/1ps
module tb_cpsr_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic msr_we = 0, nzcv_we = 0, q_set = 0, ge_we = 0;
  logic [3:0] msr_mask = '0, nzcv = '0, ge = '0;
  logic [31:0] msr_wdata = '0, cpsr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpsr_reg dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cpsr=%08h)", what, cpsr); end
  endtask

  task automatic msr(input logic [3:0] m, input logic [31:0] d);
    @(negedge clk); msr_we = 1; msr_mask = m; msr_wdata = d;
    @(negedge clk); msr_we = 0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(cpsr == 32'h0000_0010, "reset: user mode, flags clear");
    msr(4'b1000, 32'hFFFF_FFFF);
    check(cpsr == 32'hF900_0010, "flags field writes N Z C V Q J only");
    msr(4'b0100, 32'hFFFF_FFFF);
    check(cpsr == 32'hF98F_0010, "status field writes S and GE");
    msr(4'b0011, 32'h0000_0000);
    check(cpsr == 32'hF98F_0010, "extension/control fields write nothing");
    msr(4'b1000, 32'h0000_0000);
    check(cpsr == 32'h008F_0010, "flags field clears");
    // J toggling as done by the trigger code.
    msr(4'b1000, 32'h0100_0000); check(cpsr[24] == 1, "J set");
    msr(4'b1000, 32'h0000_0000); check(cpsr[24] == 0, "J clear");
    // Execute-unit updates.
    @(negedge clk); nzcv_we = 1; nzcv = 4'b1010; ge_we = 1; ge = 4'b0101;
    @(negedge clk); nzcv_we = 0; ge_we = 0;
    check(cpsr[31:28] == 4'b1010 && cpsr[19:16] == 4'b0101 && !cpsr[27], "NZCV and GE update");
    @(negedge clk); q_set = 1; @(negedge clk); q_set = 0;
    check(cpsr[27], "Q set");
    @(negedge clk); nzcv_we = 1; nzcv = 4'b0000; @(negedge clk); nzcv_we = 0;
    check(cpsr[27], "Q sticky over NZCV update");
    // MSR and update in the same cycle.
    @(negedge clk); nzcv_we = 1; nzcv = 4'b1111; msr_we = 1; msr_mask = 4'b1000; msr_wdata = 32'h4000_0000;
    @(negedge clk); nzcv_we = 0; msr_we = 0;
    check(cpsr[31:24] == 8'h40, "MSR wins over the same-cycle flag update");
    // Random stream against a model.
    model = cpsr & 32'hF98F_0000;
    repeat (300) begin
      logic [31:0] bits;
      @(negedge clk);
      msr_we = 1'($urandom); msr_mask = 4'($urandom); msr_wdata = $urandom;
      nzcv_we = 1'($urandom); nzcv = 4'($urandom); q_set = ($urandom % 5) == 0;
      ge_we = 1'($urandom); ge = 4'($urandom);
      if (nzcv_we) model[31:28] = nzcv;
      if (q_set) model[27] = 1;
      if (ge_we) model[19:16] = ge;
      bits = {{8{msr_mask[3]}}, {8{msr_mask[2]}}, {8{msr_mask[1]}}, {8{msr_mask[0]}}} & 32'hF98F_0000;
      if (msr_we) model = (model & ~bits) | (msr_wdata & bits);
      @(posedge clk); #1;
      check(cpsr == (model | 32'h10), "random stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
