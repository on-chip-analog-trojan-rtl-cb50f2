// tb_core_regs: core registers and the R0 payload. Checks: reset to 0;
// writes and reads of R0..R14 against a model; PC/unused address reads 0;
// an active-low payload pulse is seen two clocks later and leaves R0 = 1,
// also against a same-cycle core write; R0 can be rewritten afterwards; other
// registers are untouched by the payload.
`timescale 1ns/1ps
module tb_core_regs;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic payload_n = 1'b1, payload_sync;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  core_regs dut (.*);

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
    logic [31:0] model [16];
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i); #1; check(rdata == 0, "reset value");
      model[i] = 0;
    end
    repeat (200) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom; raddr = 4'($urandom);
      #1 check(rdata == model[raddr], $sformatf("read r%0d", raddr));
      if (we && waddr != 15) model[waddr] = wdata;
    end
    @(negedge clk); we = 1; waddr = 0; wdata = 0; @(negedge clk); we = 0;
    raddr = 0; #1 check(rdata == 0, "R0 = 0 before the attack");
    raddr = 3; #1 check(rdata == model[3], "R3 before");
    // Payload pulse, asynchronous to the clock.
    #2.3 payload_n = 0;
    lat = 0;
    while (!payload_sync) begin @(posedge clk); #1 lat++; end
    check(lat == 2, $sformatf("synchroniser latency %0d", lat));
    // A core write to R0 in the same cycle loses against the payload.
    @(negedge clk); we = 1; waddr = 0; wdata = 32'h1234; raddr = 0;
    @(negedge clk);
    #1 check(rdata == 32'd1, "payload wins over a same-cycle core write");
    we = 0;
    #3.1 payload_n = 1;
    repeat (4) @(negedge clk);
    raddr = 0; #1 check(rdata == 32'd1, "R0 = 1 after the payload");
    raddr = 3; #1 check(rdata == model[3], "R3 untouched");
    @(negedge clk); we = 1; waddr = 0; wdata = 32'h0; @(negedge clk); we = 0;
    raddr = 0; #1 check(rdata == 32'd0, "R0 writable again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
