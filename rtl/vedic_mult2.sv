// vedic_mult2: 2x2 -> 4-bit unsigned multiplier, the leaf of the Vedic tree.
//
// Vertical-and-crosswise (Urdhva-Tiryagbhyam) form: the vertical product
// a0b0 is bit 0; the two crosswise products a1b0 and a0b1 are added by a half
// adder to give bit 1; the vertical product a1b1 plus that carry, again by a
// half adder, gives bits 2 and 3. That the leaf is a 2x2 cell is the
// document's; the two-half-adder insides are the usual textbook cell, chosen
// here because the text does not draw it. Purely combinational.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic c1;

  assign q[0] = a[0] & b[0];

  half_adder u_ha0 (.a(a[1] & b[0]), .b(a[0] & b[1]), .sum(q[1]), .carry(c1));
  half_adder u_ha1 (.a(a[1] & b[1]), .b(c1),          .sum(q[2]), .carry(q[3]));
endmodule
