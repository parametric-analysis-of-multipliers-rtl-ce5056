// vedic_mult4: unsigned 4x4 -> 8-bit Vedic multiplier.
//
// Urdhva-Tiryagbhyam (vertically and crosswise) at the level of half-words:
// each operand is split into two 2-bit halves, the four half products are
// formed by 2x2 Vedic multipliers (vertical: high*high and low*low;
// crosswise: high*low and low*high), and vedic_combine adds them into the
// 8-bit product with three 4-bit adders and a half adder. This split and
// combine structure, applied recursively down to the 2x2 leaf, is the
// document's. Operands are taken as unsigned (all of the document's Vedic test
// values are positive and only the Booth designs are described as signed).
// Purely combinational: q is valid one propagation delay after a and b change.
module vedic_mult4 (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0] q
);
  logic [3:0] p_hh, p_hl, p_lh, p_ll;

  vedic_mult2 u_hh (.a(a[3:2]), .b(b[3:2]), .q(p_hh));
  vedic_mult2 u_hl (.a(a[3:2]), .b(b[1:0]), .q(p_hl));
  vedic_mult2 u_lh (.a(a[1:0]), .b(b[3:2]), .q(p_lh));
  vedic_mult2 u_ll (.a(a[1:0]), .b(b[1:0]), .q(p_ll));

  vedic_combine #(.N(4)) u_combine (
    .hh(p_hh), .hl(p_hl), .lh(p_lh), .ll(p_ll), .z(q)
  );
endmodule
