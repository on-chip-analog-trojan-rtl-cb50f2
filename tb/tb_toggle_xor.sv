// tb_toggle_xor: exhaustive check of the group XOR for N = 4 and a random
// check for N = 9: the output is the parity of the inputs, and flipping any
// single input flips the output (so a toggling wire is never hidden by a
// quiet group).
`timescale 1ns/1ps
module tb_toggle_xor;
  logic [3:0] sig4;
  logic       g4;
  logic [8:0] sig9;
  logic       g9;
  int checks = 0, failures = 0;

  toggle_xor #(.N(4)) dut4 (.sig (sig4), .guard (g4));
  toggle_xor #(.N(9)) dut9 (.sig (sig9), .guard (g9));

  function automatic bit parity(input logic [31:0] v, input int n);
    bit p = 0;
    for (int i = 0; i < n; i++) p ^= v[i];
    return p;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_g;
    for (int v = 0; v < 16; v++) begin
      sig4 = 4'(v);
      #1;
      checks++;
      if (g4 !== parity(32'(v), 4)) begin failures++; $display("FAIL N=4 v=%0h", v); end
      prev_g = g4;
      for (int b = 0; b < 4; b++) begin
        sig4 = 4'(v) ^ 4'(1 << b);
        #1;
        checks++;
        if (g4 === prev_g) begin failures++; $display("FAIL flip v=%0h b=%0d", v, b); end
      end
    end
    repeat (200) begin
      sig9 = 9'($urandom);
      #1;
      checks++;
      if (g9 !== parity(32'(sig9), 9)) begin failures++; $display("FAIL N=9 v=%0h", sig9); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
