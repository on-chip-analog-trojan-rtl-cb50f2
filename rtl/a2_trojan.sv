// a2_trojan: behavioural model (not synthesizable) of an A2-style analog
// Trojan trigger.
//
// The real part is a handful of transistors: a small capacitor C_unit is
// precharged to VDD while the trigger input is low and shares its charge with
// a larger capacitor C_main on every rising edge of the input; a leaking
// transistor slowly drains C_main; an inverter with a skewed threshold watches
// C_main. Only a sustained high toggle rate pumps C_main above the threshold,
// and then the trigger output goes low. When the toggling stops, C_main leaks
// down and the output returns high after a retention time.
//
// Model: the C_main voltage v (fraction of VDD) is brought up to date at
// every change of an input: it decays as exp(-dt/TAU_NS) since the last
// update (leakage), and a rising trigger edge then adds SHARE*(1-v) (charge
// sharing with SHARE = C_unit/(C_unit+C_main)). trigger_out_n = !(v >= VTH).
// While the output is low, a wake-up event is scheduled for the moment the
// decay will take v below VTH, which releases the output. Close to the
// threshold the output can go low at an edge and back high before the next
// one, as a real skewed inverter would near its switching point. The
// default constants make it fire on the 180th rising edge of a 20 MHz input,
// i.e. after 9 us, starting from an empty capacitor; they are fitted, not
// transistor values. enable low (the Trojan switched off) stops the charge
// pump and holds the output high.
`timescale 1ns/1ps
module a2_trojan #(
  parameter real SHARE  = 0.01,
  parameter real TAU_NS = 20000.0,
  parameter real VTH    = 0.7175
) (
  input  logic trigger_in,
  input  logic enable,
  output logic trigger_out_n
);

  real     v      = 0.0;
  realtime t_last = 0.0;
  logic    prev   = 1'b0;
  logic    wake   = 1'b0;

  initial trigger_out_n = 1'b1;

  always @(trigger_in or enable or wake) begin
    v      = v * $exp(-($realtime - t_last) / TAU_NS);
    t_last = $realtime;
    if (enable && trigger_in && !prev) v = v + SHARE * (1.0 - v);
    prev          = trigger_in;
    trigger_out_n = !(enable && (v >= VTH));
    if (!trigger_out_n) wake <= #(TAU_NS * $ln(v / VTH) + 0.01) !wake;
  end

endmodule
