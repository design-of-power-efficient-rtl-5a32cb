// Self-checking testbench for hng_gate.
// Applies all sixteen input patterns and compares the outputs with the
// gate's definition, computed here with integer arithmetic: R is the
// parity of A + B + C, and S is D flipped by the carry of A + B + C (the
// carry is 1 when A + B + C >= 2). With D = 0 this is exactly a full
// adder, {S, R} = A + B + C, which is checked separately. The sixteen
// output patterns must all differ (reversibility). A watchdog ends the
// run if it hangs.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;
  int sum3;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      sum3 = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== 1'(sum3 % 2) ||
          s !== (1'(sum3 >= 2) ^ d)) begin
        failures++;
        $display("FAIL abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", a, b, c, d, p, q, r, s);
      end
      if (d == 1'b0) begin
        checks++;
        if (int'({s, r}) != sum3) begin
          failures++;
          $display("FAIL full adder %0d+%0d+%0d gave %0d", a, b, c, {s, r});
        end
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %0b%0b%0b%0b repeated: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
