// multiplier_suite: the five 16-bit multipliers of the comparison, side by side.
//
// The suite holds one unsigned Vedic multiplier (vedic_mult16) and four signed
// Booth multipliers of radix 2, 4, 8 and 16. They share nothing: each has its
// own operand and product ports, so any one can be measured alone. The names
// follow the test waveforms of the study (a, b, s for the Vedic design; x, y
// and R<radix>_p for the Booth designs). All five are combinational; there is
// no clock or reset. W sets the Booth operand width; the Vedic tree is built
// for 16 bits.
module multiplier_suite import mult_pkg::*; #(
  parameter int unsigned W = MULT_W
) (
  // Vedic, unsigned
  input  logic [15:0]    vedic_a,
  input  logic [15:0]    vedic_b,
  output logic [31:0]    vedic_s,
  // Booth, two's complement
  input  logic [W-1:0]   r2_x,
  input  logic [W-1:0]   r2_y,
  output logic [2*W-1:0] r2_p,
  input  logic [W-1:0]   r4_x,
  input  logic [W-1:0]   r4_y,
  output logic [2*W-1:0] r4_p,
  input  logic [W-1:0]   r8_x,
  input  logic [W-1:0]   r8_y,
  output logic [2*W-1:0] r8_p,
  input  logic [W-1:0]   r16_x,
  input  logic [W-1:0]   r16_y,
  output logic [2*W-1:0] r16_p
);
  vedic_mult16 u_vedic (.a(vedic_a), .b(vedic_b), .s(vedic_s));

  booth_radix2  #(.W(W)) u_r2  (.x(r2_x),  .y(r2_y),  .p(r2_p));
  booth_radix4  #(.W(W)) u_r4  (.x(r4_x),  .y(r4_y),  .p(r4_p));
  booth_radix8  #(.W(W)) u_r8  (.x(r8_x),  .y(r8_y),  .p(r8_p));
  booth_radix16 #(.W(W)) u_r16 (.x(r16_x), .y(r16_y), .p(r16_p));
endmodule
