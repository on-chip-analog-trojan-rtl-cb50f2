// tb_guard_tdm: the group multiplexer in front of a shared detection unit.
// Uses G = 3. Checks: reset selects group 0; the selection advances by one
// (wrapping) on each win_end and only then; switched is high exactly in the
// cycle after a win_end; the output always equals the selected group input.
`timescale 1ns/1ps
module tb_guard_tdm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] grp = '0;
  logic win_end = 1'b0;
  logic guard, switched;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  guard_tdm #(.G(3)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sel = 0;
    bit exp_sw = 0;
    bit we;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(sel == 2'd0 && !switched, "reset state");
    for (int c = 0; c < 400; c++) begin
      grp = 3'($urandom);
      we  = ($urandom % 7) == 0;
      win_end = we;
      #1;
      check(guard == grp[exp_sel], $sformatf("guard follows group %0d", exp_sel));
      @(negedge clk);
      if (we) exp_sel = (exp_sel + 1) % 3;
      exp_sw = we;
      check(sel == 2'(exp_sel), $sformatf("sel %0d expected %0d", sel, exp_sel));
      check(switched == exp_sw, "switched flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
