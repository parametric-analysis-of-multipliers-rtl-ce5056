// booth_pp_gen: partial product generator for one radix-2^K Booth digit.
//
// A Booth digit S is given in sign/magnitude form (neg, mag) with
// mag in 0 .. 2^(K-1). The multiples 0*B .. 2^(K-1)*B of the multiplicand B are
// formed once per multiplier and shared by all digits; this block selects the
// multiple named by mag and, for a negative digit, takes its two's
// complement. The result pp = S*B is W+K bits wide, two's complement, which
// holds every S*B for a W-bit signed B. That a partial product is S*B for
// the recoded digit is the document's; the select-then-negate structure is
// this design's. Purely combinational.
module booth_pp_gen import mult_pkg::*; #(
  parameter  int unsigned W  = MULT_W,
  parameter  int unsigned K  = 2,
  localparam int unsigned NM = (1 << (K - 1)) + 1,   // number of multiples
  localparam int unsigned MW = W + K - 1             // width of one multiple
) (
  input  logic [NM-1:0][MW-1:0] multiples,  // multiples[j] = j*B, signed
  input  logic                  neg,        // digit is negative
  input  logic [K-1:0]          mag,        // digit magnitude
  output logic [W+K-1:0]        pp          // S*B, signed
);
  logic signed [MW-1:0]  sel;
  logic signed [W+K-1:0] sel_ext;

  always_comb begin
    sel = '0;
    for (int unsigned j = 0; j < NM; j++) begin
      if (mag == K'(j)) sel = multiples[j];
    end
    sel_ext = (W+K)'(sel);              // sign-extend by one bit
    pp      = neg ? -sel_ext : sel_ext;
  end

  // An encoder never asks for more than 2^(K-1)*B.
  always_comb assert (32'(mag) < NM) else $error("booth_pp_gen: digit magnitude %0d out of range", mag);
endmodule
