// vedic_mult8: unsigned 8x8 -> 16-bit Vedic multiplier.
//
// Urdhva-Tiryagbhyam (vertically and crosswise) at the level of half-words:
// each operand is split into two 4-bit halves, the four half products are
// formed by 4x4 Vedic multipliers (vertical: high*high and low*low;
// crosswise: high*low and low*high), and vedic_combine adds them into the
// 16-bit product with three 8-bit adders and a half adder. This split and
// combine structure, applied recursively down to the 2x2 leaf, is the
// document's. Operands are taken as unsigned (all of the document's Vedic test
// values are positive and only the Booth designs are described as signed).
// Purely combinational: q is valid one propagation delay after a and b change.
module vedic_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);
  logic [7:0] p_hh, p_hl, p_lh, p_ll;

  vedic_mult4 u_hh (.a(a[7:4]), .b(b[7:4]), .q(p_hh));
  vedic_mult4 u_hl (.a(a[7:4]), .b(b[3:0]), .q(p_hl));
  vedic_mult4 u_lh (.a(a[3:0]), .b(b[7:4]), .q(p_lh));
  vedic_mult4 u_ll (.a(a[3:0]), .b(b[3:0]), .q(p_ll));

  vedic_combine #(.N(8)) u_combine (
    .hh(p_hh), .hl(p_hl), .lh(p_lh), .ll(p_ll), .z(q)
  );
endmodule
