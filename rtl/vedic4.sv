// 4x4 unsigned Vedic multiplier (Urdhva Tiryagbhyam, "vertically and
// crosswise"), built from reversible gates.
//
// Step k of the method (k = 0..6) adds up every partial product a[i]&b[j]
// with i + j = k, together with the carries left over from step k-1; the
// lowest bit of that column sum is product bit k and the rest is carried
// into step k+1. Step 0 is the vertical pair a[0]b[0], steps 1 to 5 the
// crosswise pairs and step 6 the vertical pair a[3]b[3]; the carry left
// after step 6 is product bit 7. All sixteen partial products are formed at
// once, each by a Toffoli gate with its third input tied to 0, so the
// columns are summed in parallel rather than row by row.
//
// Each column is summed with one-bit reversible adders: a Peres gate with
// C = 0 as a half adder, two Peres gates (pg_full_adder) as a full adder.
// Bits per column, partial products + incoming carries:
//   col 0: 1      col 1: 2      col 2: 3+1    col 3: 4+2
//   col 4: 3+3    col 5: 2+3    col 6: 1+2    col 7: 0+1
// Every carry leaves its column for the next one, so each column is
// reduced to one bit and the result needs no final carry-propagate adder.
//
// The published design fixes the method (the seven column steps) and that
// the multiplier is made of Peres and Toffoli gates; the assignment of
// bits to adders within a column is this design's own. Operand lines feed
// several Toffoli gates directly instead of being copied first by Feynman
// gates; that changes no logic value. Purely combinational; p is valid one
// propagation delay after a and b settle.
module vedic4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  // pp[i][j] = a[i] & b[j], weight 2^(i+j)
  logic [3:0][3:0] pp;
  logic [3:0][3:0] tg_ga, tg_gb;   // Toffoli garbage (copies of a[i], b[j])

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      toffoli_gate u_tg (
        .a(a[i]), .b(b[j]), .c(1'b0),
        .p(tg_ga[i][j]), .q(tg_gb[i][j]), .r(pp[i][j])
      );
    end
  end

  // Step 0: vertical, a0b0.
  assign p[0] = pp[0][0];

  // Step 1: a0b1 + a1b0.
  logic c1a, ha1_g;
  peres_gate u_ha1 (.a(pp[0][1]), .b(pp[1][0]), .c(1'b0), .p(ha1_g), .q(p[1]), .r(c1a));

  // Step 2: a0b2 + a1b1 + a2b0 + carry from step 1.
  logic s2x, c2a, c2b, ha2_g;
  pg_full_adder u_fa2 (.x(pp[0][2]), .y(pp[1][1]), .cin(pp[2][0]), .sum(s2x), .cout(c2a));
  peres_gate    u_ha2 (.a(s2x), .b(c1a), .c(1'b0), .p(ha2_g), .q(p[2]), .r(c2b));

  // Step 3: a0b3 + a1b2 + a2b1 + a3b0 + two carries from step 2.
  logic s3x, s3y, c3a, c3b, c3c, ha3_g;
  pg_full_adder u_fa3a (.x(pp[0][3]), .y(pp[1][2]), .cin(pp[2][1]), .sum(s3x), .cout(c3a));
  pg_full_adder u_fa3b (.x(pp[3][0]), .y(c2a),      .cin(c2b),      .sum(s3y), .cout(c3b));
  peres_gate    u_ha3  (.a(s3x), .b(s3y), .c(1'b0), .p(ha3_g), .q(p[3]), .r(c3c));

  // Step 4: a1b3 + a2b2 + a3b1 + three carries from step 3.
  logic s4x, s4y, c4a, c4b, c4c, ha4_g;
  pg_full_adder u_fa4a (.x(pp[1][3]), .y(pp[2][2]), .cin(pp[3][1]), .sum(s4x), .cout(c4a));
  pg_full_adder u_fa4b (.x(c3a),      .y(c3b),      .cin(c3c),      .sum(s4y), .cout(c4b));
  peres_gate    u_ha4  (.a(s4x), .b(s4y), .c(1'b0), .p(ha4_g), .q(p[4]), .r(c4c));

  // Step 5: a2b3 + a3b2 + three carries from step 4.
  logic s5x, c5a, c5b;
  pg_full_adder u_fa5a (.x(pp[2][3]), .y(pp[3][2]), .cin(c4a), .sum(s5x),  .cout(c5a));
  pg_full_adder u_fa5b (.x(s5x),      .y(c4b),      .cin(c4c), .sum(p[5]), .cout(c5b));

  // Step 6: vertical, a3b3 + two carries from step 5; its carry is bit 7.
  pg_full_adder u_fa6 (.x(pp[3][3]), .y(c5a), .cin(c5b), .sum(p[6]), .cout(p[7]));

  // Garbage outputs of the reversible gates carry no result.
  logic unused_garbage;
  assign unused_garbage = ^{tg_ga, tg_gb, ha1_g, ha2_g, ha3_g, ha4_g};
endmodule
