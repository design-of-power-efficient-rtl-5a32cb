// Self-checking testbench for peres_gate.
// Applies all eight input patterns, compares the outputs with the gate's
// definition (P = A, Q = A xor B, R = A*B + C mod 2, computed here with
// integer arithmetic), and checks that the eight output patterns are all
// different, i.e. the gate is reversible. A watchdog ends the run if it
// hangs.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2) ||
          r !== 1'((int'(a) * int'(b) + int'(c)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %0b%0b%0b repeated: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
