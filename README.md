# R2D2: catching analog Trojan triggers by their toggle rate

An analog hardware Trojan of the A2 kind needs only a few transistors: a
small capacitor dumps charge into a larger one on every rising edge of a
"trigger" wire, the larger one leaks, and a skewed inverter fires once enough
charge has piled up. Nothing happens unless the trigger wire toggles fast for
microseconds on end. An attacker therefore hangs it on a wire that software
can flip at will but that normal programs leave almost still (a spare status
bit, a rarely used instruction's control line), and runs a short loop that
flips it. Logic testing never hits that state, and the few transistors hide
under process variation.

The defence implemented here turns that requirement against the attacker.
A small digital unit watches the wires a Trojan would need and counts how
often they change inside a fixed monitoring window. If the count in one
window reaches a threshold, the unit raises an interrupt (IRQ 15) long before
the capacitor could have charged. Window length and threshold are registers
that only privileged software can write, so they can be tuned after
fabrication and are not visible in the layout.

This repository holds synthesizable SystemVerilog for the detection units,
their configurable scope (XOR groups, time multiplexing, MUX trees), the
privileged registers and interrupt, and the parts of an ARMv7-A&R compatible
processor that the demonstration attack uses (CPSR and core registers), plus
a behavioural model of the analog trigger so the whole attack and its
detection can be simulated.

## One detection unit (`r2d2_detector`)

```
             +-----------+     a == MTW ?      +--------------------+
 clk ------->| clock     |---a---------------->| b = 0: window ends |--+ win_end
             | counter   |<-- cleared when b=0 +--------------------+  |
             +-----------+                                             |
             +-----------+     cleared when b=0 <----------------------+
 guard ----->| toggle    |---c---> c == AT and a new event ? --> detect_n (low)
 (edge det.) | counter   |
             +-----------+
   MTW register (T_m - 1)        AT register (A_th - 1)
```

* A **toggle event** is any change of level of the guarded signal, seen by
  comparing it with its value one clock earlier.
* The **clock counter** runs from 0 to the MTW value; the cycle in which it
  equals MTW is the last cycle of the window (`win_end`). It then restarts at
  0 and the toggle counter is cleared. A window is therefore exactly T_m
  cycles.
* The **toggle counter** counts events within the window. The event that
  arrives while the counter already equals the AT value is the A_th-th one:
  on that clock edge `detect_n` is registered low, for one cycle. The counter
  keeps counting (and wraps), so continued toggling raises the alarm again.
* **Register encoding.** MTW holds T_m - 1 and AT holds A_th - 1. With the
  reset values T_m = 256 and A_th = 64 this fits an 8-bit clock counter and a
  6-bit toggle counter, the sizes of the fabricated unit.
* Writing MTW or AT, or clearing `en`, restarts the window with both counts
  at zero. `hold` makes the unit ignore the guarded signal for one cycle.

Cycle accounting, as checked by the testbench: with the guarded signal
changing every cycle from the start of a window, `detect_n` goes low on the
clock edge that samples the 64th change. 63 changes at the end of one window
followed by 63 at the start of the next do not alarm: the window boundary
clears the count.

### Choosing T_m and A_th

Let a Trojan need N_t rising edges to fire and let the guarded wire change
f_a times per cycle in normal code. The worst case for the defender is a
trigger burst split evenly over two windows, so the threshold must satisfy

    f_a * T_m  <=  A_th  <=  N_t / 2      (and A_th / T_m <= 1)

The left side keeps normal programs from raising alarms; the right side
guarantees a hit. A Trojan that needs n events is caught with probability
0 for n <= A_th, n/A_th - 1 between A_th and 2 A_th, and 1 above. A false
alarm only costs an interrupt handler that checks the privileged state and
returns.

Worked numbers for the default: the demonstration Trojan fires after 180
rising edges of a 20 MHz trigger (9 us at a 150 MHz core clock). A 256-cycle
window then holds 256 x 2 x 20/150 = 68 level changes, above A_th = 64, and
64 <= 180/2. The busiest status flags of a speech-recognition workload change
in under 5% of cycles, i.e. fewer than 13 times per window.

## The monitoring scope

A unit is cheap (about 30 flip-flops), but the wires worth guarding are many.
Three mechanisms stretch one unit over many wires:

* **XOR groups** (`toggle_xor`). Wires that rarely move are XORed; a change
  on any one of them changes the XOR output, so one unit watches the group.
  Other wires of the group add their own (rare) changes, so the threshold is
  set a little lower.
* **Time multiplexing** (`guard_tdm`). Several XOR groups share one unit and
  take turns, one monitoring window each, round-robin. At the switch the
  level of the unit's input may jump; `switched` drives the unit's `hold` for
  that first cycle so the jump is not counted. Each group is now watched only
  one window in G, so window and threshold are reduced.
* **Configurable MUX trees** (`scope_mux_tree`). Each scope slot has a binary
  tree of 2:1 multiplexers over all candidate wires, and a configuration word
  picks the leaf. Which wires are guarded is decided after fabrication and is
  not visible to whoever inserts a Trojan in the layout. Leaves beyond the
  last candidate read 0; the all-ones selection (the reset value) switches a
  slot off.

## The demonstration slice (`merlin_r2d2_top`)

```
 MSR / flag writes --> cpsr_reg --CPSR_J--+--> a2_trojan --trojan_trig_n--> core_regs (R0 := 1)
                          |               |                                 and output pin
                          |               +--> r2d2_detector unit 0 (T_m 256, A_th 64) --+
                          |                                                               |
  N Z C V Q J S GE[3:0] --+--> scope_mux_tree --8 slots--> 2 x toggle_xor --> guard_tdm   |
  ext_cand[3:0] ---------/                                  --> r2d2_detector unit 1 --+  |
                                                                                       v  v
  cfg bus (privileged) <--------------------------> r2d2_csr -----------------------> irq15
```

* **Trigger input.** The Trojan sits on CPSR_J (bit 24). This processor
  has no Jazelle or Thumb support, so J has no function, but it is stored and
  MSR can write it; the attack program writes 0 and 1 to it alternately, 200
  times. CPSR[23] (S) is the processor's own superscalar/VLIW mode-switch
  flag; it, too, changes rarely and is offered to the scope.
* **Payload.** While the (synchronised) Trojan output is active, R0 is
  forced to 1, so software that cleared R0 before the loop sees 1 after it.
* **Unit 0** guards CPSR_J directly, with the settings of the fabricated
  chip.
* **Unit 1** shows the scope machinery: 15 candidate wires (the 11 stored
  CPSR flag bits and 4 external wires, e.g. the branch-prediction enable or
  prefetch-hint control lines of the core), 8 slots, 2 XOR groups of 4, time
  multiplexed. Its reset window and threshold are halved (128 / 32).
* **Interrupt.** Either unit's alarm sets a pending flag that drives `irq15`
  until software clears it.
* **Processor.** The core itself is outside this design: its MSR and flag
  updates, register-file accesses and candidate wires are ports of the top.
  `trojan_en` switches the Trojan model on and off, as the chip's test
  mode does.

### Configuration registers (`r2d2_csr`, map in `r2d2_pkg`)

| word address | name | contents |
|---|---|---|
| 0x00 | CTRL | bit u: unit u enabled (reset: all on) |
| 0x01 | STATUS | bit 0: IRQ 15 pending; bit 1+u: unit u fired. Write 1 to clear |
| 0x02 + 2u | MTW u | T_m - 1 of unit u |
| 0x03 + 2u | AT u | A_th - 1 of unit u |
| 0x10 + s | SCOPE s | candidate index of scope slot s (0..14; 15 = off) |

Candidate indices: 0 N, 1 Z, 2 C, 3 V, 4 Q, 5 J, 6 S, 7-10 GE[0..3],
11-14 ext_cand[0..3].

The bus is a single-cycle request: `cfg_req` with `cfg_we`, address and
data; reads return `cfg_rdata` combinationally in the same cycle. Writes are
accepted only with `cfg_priv` high; an unprivileged write changes nothing and
raises `cfg_err` in that cycle. Reads are always allowed so that the units can
be tested after fabrication by writing and reading back their registers and
then running toggle loops.

## The analog trigger model (`a2_trojan`)

Behavioural only (real numbers, delays). The C_main voltage v, as a fraction
of VDD, decays as exp(-t / TAU_NS) and gains SHARE x (1 - v) on each rising
trigger edge; the output is low while v >= VTH. The output is updated at
every input change and at a scheduled wake-up when the decay will cross VTH.
Defaults (SHARE 0.01, TAU_NS 20000, VTH 0.7175) are fitted so that a 20 MHz
trigger fires it on the 180th rising edge, 9 us after starting. The retention
time after the toggling stops is not fitted: here it is short, where the
transistor-level simulation of the original circuit shows about 15 us and
the silicon 20 to 30 us. Near the threshold the output can flicker
low and high before settling, as a real skewed inverter would.

## Where this RTL makes its own choices

The detection unit's structure, the reset settings (256 / 64), counter
widths, CPSR bit layout, the CPSR_J trigger, the R0 payload, IRQ 15 and the
three scope mechanisms follow the published design. These are this
implementation's choices:

* counting both edges of the guarded signal, and the minus-one register
  encoding (see above);
* the one-cycle registered alarm, its repetition under continued toggling,
  and restarting the window on a register write;
* the round-robin, one-window-per-group schedule and the `hold` on switching;
* MUX-tree configuration held in flip-flops (the proposal uses ReRAM cells);
* the register bus, address map, write-1-to-clear pending flag and the
  privilege qualifier `cfg_priv`;
* unit 1 and all scope sizes;
* register file with one write and one read port; a two-flop synchroniser on
  the Trojan output; MSR writes take priority over same-cycle flag updates;
  the mode field reads as user mode.

Also not modelled: a unit with several toggle counters, per-group window and
threshold inside one time-multiplexed unit (groups that need their own
settings get their own unit here), and the core stalling to take the
interrupt.

Not included: the processor core (ARMv7-A&R dual-issue / VLIW, 10-stage
pipeline, branch predictor), caches and memories, the SoC buses and
peripherals, the interrupt controller behind IRQ 15, and the multi-stage
Trojan triggers that combine several A2 circuits.

For size, a detection unit here has 31 flip-flops (MTW 8, AT 6, counters
8 + 6, three control bits); the FPGA build of the original design reported
25 more registers and 24 more LUTs for its unit.

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_merlin_r2d2_top rtl/r2d2_pkg.sv tb/tb_merlin_r2d2_top.sv
./obj_dir/Vtb_merlin_r2d2_top
```

| testbench | what it shows |
|---|---|
| `tb_merlin_r2d2_top` | the whole slice at its default parameters and 150 MHz: trigger program caught by unit 0 before the Trojan fires (R0 stays 0); unprivileged disable refused; with unit 0 off the Trojan fires after about 180 edges and R0 becomes 1; benign flag activity gives no alarm; fast wires in either XOR group are caught by unit 1 while the groups alternate; reprogramming |
| `tb_r2d2_detector` | window length, exact alarm cycle, 63+63 split escapes while any split of 2 x A_th is caught, reprogrammed window/threshold, hold, enable |
| `tb_guard_tdm` | round-robin schedule and `switched` against a model |
| `tb_scope_mux_tree` | every selection of every slot, including the off leaf |
| `tb_toggle_xor` | parity and single-wire visibility |
| `tb_r2d2_csr` | privilege rule, strobes, read-back, IRQ set and clear |
| `tb_cpsr_reg` | MSR field masks, stored bits, flag updates, random stream against a model |
| `tb_core_regs` | register file against a model, payload latency and priority |
| `tb_a2_trojan` | fires on edge 180 at 20 MHz, releases after toggling stops, silent at 1 MHz and when disabled |

The testbenches use a two-state simulator view: everything that is read is
reset or initialised.
