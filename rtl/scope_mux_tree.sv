// scope_mux_tree: configurable MUX trees that choose the monitoring scope.
//
// Many wires of the processor could carry a Trojan trigger. Rather than fix
// at design time which of them are guarded, each of NSLOTS slots has its own
// binary tree of 2:1 multiplexers over all NCAND candidate wires, and a
// configuration value picks the leaf. Configured after fabrication, the set of
// guarded wires is unknown to whoever inserts a Trojan. Leaves past NCAND read
// 0, and SELW leaves room for at least one, so a slot can be switched off
// (the all-ones selection always is).
//
// Tree levels: root decides on sel[SELW-1], leaves on sel[0]. Purely
// combinational. The configuration is held in registers here (the proposal
// uses ReRAM cells); slot and candidate counts are this design's choice.
`timescale 1ns/1ps
module scope_mux_tree #(
  parameter int unsigned NCAND  = 15,
  parameter int unsigned NSLOTS = 8,
  parameter int unsigned SELW   = $clog2(NCAND + 1)
) (
  input  logic [NCAND-1:0]             cand,
  input  logic [NSLOTS-1:0][SELW-1:0]  sel,
  output logic [NSLOTS-1:0]            slot
);

  localparam int unsigned LEAVES = 1 << SELW;

  logic [LEAVES-1:0] leaf;
  always_comb begin
    leaf = '0;
    leaf[NCAND-1:0] = cand;
  end

  for (genvar s = 0; s < NSLOTS; s++) begin : g_slot
    // Heap order: node k has children 2k+1 (select bit 0) and 2k+2 (bit 1);
    // leaf i is node LEAVES-1+i.
    logic [2*LEAVES-2:0] node;
    for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
      assign node[LEAVES-1+i] = leaf[i];
    end
    for (genvar d = 0; d < SELW; d++) begin : g_level
      for (genvar j = 0; j < (1 << d); j++) begin : g_mux
        localparam int unsigned K = (1 << d) - 1 + j;
        assign node[K] = sel[s][SELW-1-d] ? node[2*K+2] : node[2*K+1];
      end
    end
    assign slot[s] = node[0];
  end

endmodule
