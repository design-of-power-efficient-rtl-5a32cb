// 8x8 unsigned reversible-logic Vedic multiplier (top level).
//
// The operands are split into nibbles, a = {aH, aL} and b = {bH, bL}, and
// four 4x4 Vedic multipliers form the four cross products at once:
//   qHH = aH*bH, qHL = aH*bL, qLH = aL*bH, qLL = aL*bL.
// The product is qHH<<8 + (qHL + qLH)<<4 + qLL, which three 8-bit
// reversible ripple-carry adders (rca_hng, one HNG gate per bit) assemble:
//   adder 1: qHL + qLH                      -> mid1, carry ca1
//   adder 2: mid1 + {0000, qLL[7:4]}        -> mid2, carry ca2
//   adder 3: qHH + {00, ca1&ca2, ca1^ca2, mid2[7:4]} -> s[15:8], carry ca3
//   s[7:4] = mid2[3:0], s[3:0] = qLL[3:0].
// ca1 and ca2 both weigh 2^12 in the product; a Peres gate used as a half
// adder merges them (its XOR output into bit 4 and its AND output into
// bit 5 of adder 3's second operand). Since qHL + qLH + qLL[7:4] < 512, at
// most one of them is ever set, so the AND output is always 0 and ca3 is
// always 0; both are kept so the circuit stays a faithful adder tree.
// Each nibble feeds two multipliers; reversible logic forbids fan-out, so
// a Feynman gate with its second input tied to 0 copies each operand bit.
//
// Follows the published block diagram: four 4x4 Vedic multipliers, three
// 8-bit HNG ripple-carry adders, Feynman and Peres gates. The diagram
// routes only ca1 into the last adder; the merge of ca1 and ca2 through an
// XOR and an AND follows the published synthesised schematic, and is
// needed for a correct product. Inputs are unsigned. The design is purely
// combinational, with no clock or register; s is valid one propagation
// delay after a and b settle, the path running through one 4x4 multiplier
// and then the three ripple adders in series.
module vedic8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s
);
  // ---- operand fan-out through Feynman gates -----------------------------
  logic [7:0] a_c0, a_c1, b_c0, b_c1;   // two copies of each operand

  for (genvar i = 0; i < 8; i++) begin : g_copy
    feynman_gate u_fg_a (.a(a[i]), .b(1'b0), .p(a_c0[i]), .q(a_c1[i]));
    feynman_gate u_fg_b (.a(b[i]), .b(1'b0), .p(b_c0[i]), .q(b_c1[i]));
  end

  // ---- four 4x4 Vedic multipliers ----------------------------------------
  logic [7:0] q_hh, q_hl, q_lh, q_ll;

  vedic4 u_v_hh (.a(a_c0[7:4]), .b(b_c0[7:4]), .p(q_hh));
  vedic4 u_v_hl (.a(a_c1[7:4]), .b(b_c0[3:0]), .p(q_hl));
  vedic4 u_v_lh (.a(a_c0[3:0]), .b(b_c1[7:4]), .p(q_lh));
  vedic4 u_v_ll (.a(a_c1[3:0]), .b(b_c1[3:0]), .p(q_ll));

  // ---- adder 1: the two middle cross products ----------------------------
  logic [7:0]  mid1;
  logic        ca1;
  logic [15:0] g_fa1;

  rca_hng #(.WIDTH(8)) u_fa1 (
    .a(q_hl), .b(q_lh), .cin(1'b0),
    .sum(mid1), .cout(ca1), .garbage(g_fa1)
  );

  // ---- adder 2: add the upper nibble of the low cross product ------------
  logic [7:0]  mid2;
  logic        ca2;
  logic [15:0] g_fa2;

  rca_hng #(.WIDTH(8)) u_fa2 (
    .a(mid1), .b({4'b0000, q_ll[7:4]}), .cin(1'b0),
    .sum(mid2), .cout(ca2), .garbage(g_fa2)
  );

  // ---- merge the two carries of weight 2^12 ------------------------------
  logic ca_xor, ca_and, pg_g;

  peres_gate u_pg_carry (
    .a(ca1), .b(ca2), .c(1'b0),
    .p(pg_g), .q(ca_xor), .r(ca_and)
  );

  // ---- adder 3: high cross product plus everything carried up ------------
  logic        ca3;
  logic [15:0] g_fa3;

  rca_hng #(.WIDTH(8)) u_fa3 (
    .a(q_hh), .b({2'b00, ca_and, ca_xor, mid2[7:4]}), .cin(1'b0),
    .sum(s[15:8]), .cout(ca3), .garbage(g_fa3)
  );

  assign s[7:4] = mid2[3:0];
  assign s[3:0] = q_ll[3:0];

  // Garbage outputs and the never-set final carry carry no result.
  logic unused_garbage;
  assign unused_garbage = ^{g_fa1, g_fa2, g_fa3, pg_g, ca3};
endmodule
