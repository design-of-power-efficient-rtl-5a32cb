// Self-checking testbench for vedic4.
// Multiplies every pair of 4-bit operands and compares the 8-bit result
// with the integer product. It also counts products that use bit 7 (the
// carry out of the last column step); at least one must occur. A watchdog
// ends the run if it hangs.
module tb_vedic4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0, top_carry = 0;

  vedic4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          $display("FAIL %0d*%0d gave %0d", x, y, p);
        end
        if (p[7]) top_carry++;
      end
    checks++;
    if (top_carry == 0) begin
      failures++;
      $display("FAIL no product reached bit 7");
    end
    $display("products using bit 7: %0d", top_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
