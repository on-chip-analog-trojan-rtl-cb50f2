// toggle_xor: folds a group of guarded wires into one guarded signal.
//
// Wires that rarely toggle are XORed together so that one detection unit
// covers the whole group: whenever any single wire of the group changes, the
// XOR output changes too, so a wire driven at a high toggle rate shows up as a
// high toggle rate on the output. Purely combinational; group size N is a
// parameter (the default of 4 is this design's choice).
`timescale 1ns/1ps
module toggle_xor #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] sig,
  output logic         guard
);

  always_comb guard = ^sig;

endmodule
