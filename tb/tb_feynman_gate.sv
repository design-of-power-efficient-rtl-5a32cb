// Self-checking testbench for feynman_gate.
// Applies all four input patterns, compares P and Q with the gate's
// definition (P = A, Q = A xor B, written here as A + B mod 2), and checks
// that the four output patterns are all different, i.e. the gate is
// reversible. A watchdog ends the run if it hangs.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> p=%0b q=%0b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %0b%0b repeated: not reversible", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
