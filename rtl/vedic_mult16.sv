// vedic_mult16: unsigned 16x16 -> 32-bit Vedic multiplier.
//
// Urdhva-Tiryagbhyam (vertically and crosswise) at the level of half-words:
// each operand is split into two 8-bit halves, the four half products are
// formed by 8x8 Vedic multipliers (vertical: high*high and low*low;
// crosswise: high*low and low*high), and vedic_combine adds them into the
// 32-bit product with three 16-bit adders and a half adder. This split and
// combine structure, applied recursively down to the 2x2 leaf, is the
// document's. Operands are taken as unsigned (all of the document's Vedic test
// values are positive and only the Booth designs are described as signed).
// Purely combinational: s is valid one propagation delay after a and b change.
module vedic_mult16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] s
);
  logic [15:0] p_hh, p_hl, p_lh, p_ll;

  vedic_mult8 u_hh (.a(a[15:8]), .b(b[15:8]), .q(p_hh));
  vedic_mult8 u_hl (.a(a[15:8]), .b(b[7:0]), .q(p_hl));
  vedic_mult8 u_lh (.a(a[7:0]), .b(b[15:8]), .q(p_lh));
  vedic_mult8 u_ll (.a(a[7:0]), .b(b[7:0]), .q(p_ll));

  vedic_combine #(.N(16)) u_combine (
    .hh(p_hh), .hl(p_hl), .lh(p_lh), .ll(p_ll), .z(s)
  );
endmodule
