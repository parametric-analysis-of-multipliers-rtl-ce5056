// booth_pp_adder: adds the partial products of a radix-2^K Booth multiplier.
//
// Partial product i (W+K bits, two's complement) is sign-extended to the
// 2W-bit product width and weighted by 2^(K*i), i.e. shifted left by K bits
// per digit, then all ND are added; the sum is taken modulo 2^(2W), which is
// exact for a W x W signed product. The shift of K bits per digit and the
// sign extension before adding are the document's; the plain sum (no
// compressor tree) is this design's choice. Purely combinational.
module booth_pp_adder import mult_pkg::*; #(
  parameter int unsigned W  = MULT_W,
  parameter int unsigned K  = 2,
  parameter int unsigned ND = booth_num_digits(MULT_W, 2)
) (
  input  logic [ND-1:0][W+K-1:0] pp,   // pp[i] = S_i*B, signed
  output logic [2*W-1:0]         p     // sum of pp[i] * 2^(K*i)
);
  logic signed [W+K-1:0] term;
  logic signed [2*W-1:0] term_ext;

  always_comb begin
    p        = '0;
    term     = '0;
    term_ext = '0;
    for (int unsigned i = 0; i < ND; i++) begin
      term     = pp[i];
      term_ext = (2*W)'(term);          // sign extension to 2W bits
      p        = p + (term_ext << (K * i));
    end
  end
endmodule
