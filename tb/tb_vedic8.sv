// End-to-end self-checking testbench for vedic8, the 8x8 multiplier, with
// its defaults (it has no parameters).
// First applies 16 * 3 and expects 48. Then multiplies every pair of 8-bit
// operands and compares the 16-bit result with the integer product.
// It counts how often each carry path of the adder tree is used, working
// out the carries from the operands with integer arithmetic (not from the
// block's internal nets):
//   ca1      - carry out of adding the two middle cross products
//   ca2      - carry out of adding the low cross product's upper nibble
//   ca2 only - ca2 set while ca1 is clear, the case that needs the carry
//              merge gate
// Each must occur at least once; ca1 and ca2 set together must never
// occur. A watchdog ends the run if it hangs.
module tb_vedic8;
  logic [7:0]  a, b;
  logic [15:0] s;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_ca2_only = 0, n_both = 0;
  int mid, ca1, ca2;

  vedic8 dut (.a(a), .b(b), .s(s));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd16; b = 8'd3;
    #1;
    checks++;
    if (s !== 16'd48) begin
      failures++;
      $display("FAIL 16*3 gave %0d", s);
    end

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (int'(s) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d gave %0d", x, y, s);
        end
        // cross products of the nibbles, as the adder tree sees them
        mid = (x >> 4) * (y % 16) + (x % 16) * (y >> 4);
        ca1 = mid >> 8;
        ca2 = ((mid % 256) + ((x % 16) * (y % 16)) / 16) >> 8;
        if (ca1 != 0) n_ca1++;
        if (ca2 != 0) n_ca2++;
        if (ca2 != 0 && ca1 == 0) n_ca2_only++;
        if (ca2 != 0 && ca1 != 0) n_both++;
      end

    $display("ca1 set: %0d  ca2 set: %0d  ca2 without ca1: %0d", n_ca1, n_ca2, n_ca2_only);
    checks += 4;
    if (n_both != 0)     begin failures++; $display("FAIL ca1 and ca2 set together"); end
    if (n_ca1 == 0)      begin failures++; $display("FAIL ca1 never set"); end
    if (n_ca2 == 0)      begin failures++; $display("FAIL ca2 never set"); end
    if (n_ca2_only == 0) begin failures++; $display("FAIL ca2 never set alone"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
