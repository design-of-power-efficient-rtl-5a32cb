// Self-checking testbench for rca_hng.
// Runs every operand pair and carry-in through the 8-bit adder (the
// default width) and a 4-bit instance, and compares {cout, sum} with the
// integer sum a + b + cin. It also checks the garbage outputs, which must
// be the untouched operand bits (garbage[2i] = a[i], garbage[2i+1] = b[i]).
// A few carry chains running through every bit (a = 2^W-1, b = 0,
// cin = 1) are counted; at least one must occur. A watchdog ends the run
// if it hangs.
module tb_rca_hng;
  localparam int W8 = 8;
  localparam int W4 = 4;

  logic [W8-1:0]   a8, b8, s8;
  logic            ci8, co8;
  logic [2*W8-1:0] g8;
  logic [W4-1:0]   a4, b4, s4;
  logic            ci4, co4;
  logic [2*W4-1:0] g4;

  int checks = 0, failures = 0, full_ripples = 0;

  rca_hng                dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8), .garbage(g8));
  rca_hng #(.WIDTH(W4))  dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4), .garbage(g4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W8); x++)
      for (int y = 0; y < (1 << W8); y++)
        for (int c = 0; c < 2; c++) begin
          a8 = W8'(x); b8 = W8'(y); ci8 = 1'(c);
          a4 = W4'(x); b4 = W4'(y); ci4 = 1'(c);
          #1;
          checks++;
          if (int'({co8, s8}) != x + y + c) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d gave %0d", x, y, c, {co8, s8});
          end
          checks++;
          for (int i = 0; i < W8; i++)
            if (g8[2*i] !== a8[i] || g8[2*i+1] !== b8[i]) begin
              failures++;
              if (failures < 10) $display("FAIL 8-bit garbage %h for a=%h b=%h", g8, a8, b8);
              break;
            end
          if (x < (1 << W4) && y < (1 << W4)) begin
            checks++;
            if (int'({co4, s4}) != x + y + c) begin
              failures++;
              $display("FAIL 4-bit %0d+%0d+%0d gave %0d", x, y, c, {co4, s4});
            end
          end
          if (x == (1 << W8) - 1 && y == 0 && c == 1) full_ripples++;
        end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was exercised");
    end
    $display("full-length carry ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
