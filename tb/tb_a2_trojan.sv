// tb_a2_trojan: the behavioural analog trigger. Checks: a 20 MHz input fires
// it on the 180th rising edge, 9 us after the toggling starts; it keeps the
// output low while toggling continues, and releases it some time after the
// toggling stops (retention); a 1 MHz input never fires it; with enable low
// even 20 MHz toggling never fires it.
`timescale 1ns/1ps
module tb_a2_trojan;
  logic trigger_in = 1'b0, enable = 1'b1, trigger_out_n;
  int checks = 0, failures = 0;
  int edges;
  bit fired;
  realtime t_start, t_fire, t_stop, t_release;

  int fire_edges;

  a2_trojan dut (.*);

  // First activation of the trigger output, with the edge count at that time.
  always @(negedge trigger_out_n)
    if (!fired) begin fired = 1; t_fire = $realtime; fire_edges = edges; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // n rising edges with the given period (ns); stops early once fired if asked.
  task automatic toggle(input int n, input realtime period, input bit stop_on_fire);
    for (int i = 0; i < n; i++) begin
      #(period / 2) trigger_in = 1'b1; edges++;
      #(period / 2) trigger_in = 1'b0;
      if (stop_on_fire && fired) break;
    end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    check(trigger_out_n, "idle output high");

    // 20 MHz until it fires.
    edges = 0; fired = 0; t_start = $realtime;
    toggle(400, 50.0, 1);
    check(fired, "fires at 20 MHz");
    check(fire_edges == 180, $sformatf("fires on the 180th rising edge (%0d)", fire_edges));
    check((t_fire - t_start) >= 8950 && (t_fire - t_start) <= 9050,
          $sformatf("trigger time about 9 us (%0.1f ns)", t_fire - t_start));
    // Keep toggling: stays low.
    toggle(40, 50.0, 0);
    check(!trigger_out_n, "stays low while toggling continues");
    t_stop = $realtime;
    wait (trigger_out_n);
    t_release = $realtime;
    check(t_release > t_stop, $sformatf("released %0.1f ns after the toggling stops", t_release - t_stop));
    #200us;   // discharge

    // 1 MHz: benign rate.
    edges = 0; fired = 0;
    toggle(400, 1000.0, 1);
    check(!fired, "1 MHz toggling never fires");
    #200us;

    // Disabled Trojan.
    enable = 1'b0; edges = 0; fired = 0;
    toggle(400, 50.0, 1);
    check(!fired, "disabled Trojan never fires");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
