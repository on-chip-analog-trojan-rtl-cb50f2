// tb_r2d2_detector: self-checking test of one detection unit at its reset
// configuration (T_m = 256 cycles, A_th = 64 events) and after reprogramming.
//
// Checks: register reset values; window length between win_end pulses;
// a benign low toggle rate never alarms; toggling every cycle from a window
// start alarms on exactly the 64th event, one cycle later, for one cycle;
// 63 events at the end of one window plus 63 at the start of the next do not
// alarm (the window boundary clears the count), while 128 = 2*A_th events
// are caught however they are split; reprogrammed T_m = 16, A_th
// = 4 alarms at 6 events per window and stays quiet at 2; hold and en = 0
// suppress counting.
`timescale 1ns/1ps
module tb_r2d2_detector;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b1, guard = 1'b0, hold = 1'b0;
  logic mtw_we = 1'b0, at_we = 1'b0;
  logic [7:0] mtw_wdata = '0, mtw_q;
  logic [5:0] at_wdata = '0, at_q;
  logic win_end, detect_n;
  int checks = 0, failures = 0;
  int alarms = 0;

  always #5 clk = ~clk;

  r2d2_detector dut (.*);

  always @(posedge clk) if (rst_n && !detect_n) alarms++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Drive on the falling edge so that values are stable at the rising edge.
  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_window_start();
    while (!win_end) step();
    step();   // first cycle of the next window
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, n, first_low, low_cycles, a0;
    step(2);
    rst_n = 1'b1;
    check(mtw_q == 8'd255, "MTW reset = T_m-1 = 255");
    check(at_q == 6'd63, "AT reset = A_th-1 = 63");

    // Window length.
    wait_window_start();
    t0 = $time;
    while (!win_end) step();
    step();
    t1 = $time;
    check((t1 - t0) / 10 == 256, $sformatf("window is 256 cycles (got %0d)", (t1 - t0) / 10));

    // Benign: one event every 10 cycles for 4 windows -> at most 26 per window.
    a0 = alarms;
    repeat (100) begin guard = ~guard; step(10); end
    check(alarms == a0, "benign toggling does not alarm");

    // Attack from a window start: one event per cycle.
    wait_window_start();
    n = 0; first_low = -1; low_cycles = 0;
    for (int c = 0; c < 120; c++) begin
      if (c < 100) begin guard = ~guard; n++; end
      step();
      if (!detect_n) begin
        low_cycles++;
        if (first_low < 0) first_low = n;
      end
    end
    // The edge that samples the 64th event drives detect_n low; it is seen
    // at the next falling edge, right after the 64th drive.
    check(first_low == 64, $sformatf("alarm on the edge that samples the 64th event (seen after %0d drives)", first_low));
    check(low_cycles == 1, $sformatf("alarm lasts one cycle (%0d)", low_cycles));

    // Straddle: 63 events at the end of a window, 63 at the start of the next.
    wait_window_start();
    a0 = alarms;
    step(256 - 63);
    repeat (126) begin guard = ~guard; step(); end
    step(4);
    check(alarms == a0, "63+63 events across a window boundary do not alarm");

    // Guarantee behind A_th <= N_t/2: a burst of 2*A_th = 128 events that
    // fits in two windows is caught however it is split across the boundary.
    for (int k = 0; k <= 128; k += 16) begin
      wait_window_start();
      a0 = alarms;
      step(256 - k);
      repeat (128) begin guard = ~guard; step(); end
      step(2);
      check(alarms > a0, $sformatf("128 events split %0d/%0d are caught", k, 128 - k));
    end

    // Reprogram: T_m = 16, A_th = 4.
    mtw_wdata = 8'd15; mtw_we = 1'b1; step(); mtw_we = 1'b0;
    at_wdata = 6'd3; at_we = 1'b1; step(); at_we = 1'b0;
    check(mtw_q == 8'd15 && at_q == 6'd3, "MTW/AT read back after write");
    wait_window_start();
    t0 = $time;
    while (!win_end) step();
    step();
    check(($time - t0) / 10 == 16, "reprogrammed window is 16 cycles");
    a0 = alarms;
    repeat (20) begin guard = ~guard; step(8); end   // 2 per window
    check(alarms == a0, "2 events per 16-cycle window do not reach A_th = 4");
    repeat (20) begin guard = ~guard; step(3); end   // 5-6 per window
    check(alarms - a0 >= 3, $sformatf("5-6 events per window alarm (%0d alarms)", alarms - a0));

    // hold masks events.
    a0 = alarms;
    hold = 1'b1;
    repeat (64) begin guard = ~guard; step(); end
    hold = 1'b0;
    step(2);
    check(alarms == a0, "events under hold are not counted");

    // Disabled unit never alarms.
    en = 1'b0;
    repeat (64) begin guard = ~guard; step(); end
    check(alarms == a0 && detect_n, "disabled unit does not alarm");
    check(!win_end, "disabled unit has no windows");
    en = 1'b1;
    repeat (8) begin guard = ~guard; step(); end
    check(alarms > a0, "re-enabled unit alarms again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
