// vedic_combine: adder network that joins four half-width products into the
// 2N-bit product of an N x N Vedic multiplier.
//
// With P = {Ph, Pl} and Q = {Qh, Ql} (halves of N/2 bits) the inputs are the
// N-bit products hh = Ph*Qh, hl = Ph*Ql, lh = Pl*Qh and ll = Pl*Ql (= d).
//   * z[N/2-1:0]   = d[N/2-1:0]
//   * temp1, C1    = hl + lh                          (first N-bit addition)
//   * temp2, C2    = temp1 + {0, d[N-1:N/2]}          (second N-bit addition)
//   * z[N-1:N/2]   = temp2[N/2-1:0]
//   * Sum, Carry   = C1 + C2                          (half adder)
//   * z[2N-1:N]    = hh + {Carry, Sum, temp2[N-1:N/2]} (third N-bit addition)
// This follows the document's structure drawing of the Vedic multiplier. The
// drawing does not print where Sum and Carry enter the third addition; they
// sit at weights N/2 and N/2+1 of its operand, which is what makes the result
// the product. Carry is always 0 when the inputs are real products; it is
// kept to match the drawing. Adder carry-ins are tied to 0 (not shown).
// Purely combinational; N must be even and at least 4.
module vedic_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   hh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   ll,
  output logic [2*N-1:0] z
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] temp1, temp2;
  logic         c1, c2, ha_sum, ha_carry;
  logic [N-1:0] hi_op;

  nbit_adder #(.N(N)) u_add1 (
    .a(hl), .b(lh), .cin(1'b0), .sum(temp1), .carry(c1)
  );

  nbit_adder #(.N(N)) u_add2 (
    .a(temp1), .b({{H{1'b0}}, ll[N-1:H]}), .cin(1'b0), .sum(temp2), .carry(c2)
  );

  half_adder u_ha (.a(c1), .b(c2), .sum(ha_sum), .carry(ha_carry));

  // Operand of the third addition: {Carry, Sum, temp2[N-1:N/2]}, zero above.
  always_comb begin
    hi_op        = '0;
    hi_op[H-1:0] = temp2[N-1:H];
    hi_op[H]     = ha_sum;
    hi_op[H+1]   = ha_carry;
  end

  // Its carry out is left open: the product of two N-bit numbers fits 2N bits.
  nbit_adder #(.N(N)) u_add3 (
    .a(hh), .b(hi_op), .cin(1'b0), .sum(z[2*N-1:N]), .carry()
  );

  assign z[H-1:0] = ll[H-1:0];
  assign z[N-1:H] = temp2[H-1:0];
endmodule
