// tb_scope_mux_tree: every slot of the configurable scope selects the wire
// its configuration names. NCAND = 15 candidates, 8 slots, 4 select bits:
// each slot is checked against every selection 0..15 with random candidate
// values (15 is the spare leaf and must read 0), plus random mixed
// configurations.
`timescale 1ns/1ps
module tb_scope_mux_tree;
  localparam int NC = 15, NS = 8, SW = 4;
  logic [NC-1:0]         cand;
  logic [NS-1:0][SW-1:0] sel;
  logic [NS-1:0]         slot;
  int checks = 0, failures = 0;

  scope_mux_tree #(.NCAND(NC), .NSLOTS(NS), .SELW(SW)) dut (.*);

  function automatic bit ref_bit(input logic [NC-1:0] c, input int idx);
    return (idx < NC) ? c[idx] : 1'b0;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int r = 0; r < 8; r++) begin
        cand = NC'($urandom);
        for (int s = 0; s < NS; s++) sel[s] = SW'(v);
        #1;
        for (int s = 0; s < NS; s++) begin
          checks++;
          if (slot[s] !== ref_bit(cand, v)) begin
            failures++;
            $display("FAIL slot %0d sel %0d", s, v);
          end
        end
      end
    end
    repeat (300) begin
      cand = NC'($urandom);
      for (int s = 0; s < NS; s++) sel[s] = SW'($urandom);
      #1;
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (slot[s] !== ref_bit(cand, int'(sel[s]))) begin
          failures++;
          $display("FAIL random slot %0d sel %0d", s, sel[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
