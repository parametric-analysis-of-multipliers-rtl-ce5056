// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
//
// Used in the Vedic combine network (to add the carries of the two middle
// additions) and in the 2x2 Vedic leaf cell. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
