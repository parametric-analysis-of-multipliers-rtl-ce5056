// booth_radix4: signed W x W -> 2W-bit radix-4 Booth multiplier.
//
// p = x * y for two's-complement x (multiplicand B) and y (multiplier A).
// Three stages, as in the document's Booth block diagram:
//   * Encoder: y is split into overlapping 3-bit groups, one per digit, and
//     each group is recoded into a digit S_k in sign/magnitude form by the
//     radix-4 table (Table 2 of the document).
//   * Partial product generator: booth_pp_gen forms S_k * x for each digit
//     from a shared set of multiples of x.
//   * Adder: booth_pp_adder sign-extends the partial products and adds them
//     with a shift of 2 bits per digit.
// Groups are (y[2k+1], y[2k], y[2k-1]) with a 0 appended below the LSB; the digit
// set is {0, +-B, +-2B}, 2B being a shift of B.
// With W = 16 there are 8 digits. The recoding table and the structure are the
// document's; the sign/magnitude digit form and the plain sum are this
// design's. Purely combinational: p is valid one propagation delay after x
// and y change. No clock or reset.
module booth_radix4 import mult_pkg::*; #(
  parameter int unsigned W = MULT_W
) (
  input  logic [W-1:0]   x,   // multiplicand, two's complement
  input  logic [W-1:0]   y,   // multiplier, two's complement
  output logic [2*W-1:0] p    // product, two's complement
);
  localparam int unsigned K  = 2;                        // bits retired per digit
  localparam int unsigned ND = booth_num_digits(W, K);   // number of digits
  localparam int unsigned NM = (1 << (K - 1)) + 1;       // multiples 0*B .. 2^(K-1)*B
  localparam int unsigned MW = W + K - 1;                // width of one multiple

  // Multiplier, sign-extended to ND*K bits, with a 0 appended below the LSB.
  logic signed [ND*K-1:0] y_ext;
  logic        [ND*K:0]   y_grp;

  // Sign/magnitude digits from the encoder.
  logic [ND-1:0]          dig_neg;
  logic [ND-1:0][K-1:0]   dig_mag;

  // Shared multiples of the multiplicand.
  logic signed [MW-1:0]   bx;
  logic [NM-1:0][MW-1:0] mult;

  logic [ND-1:0][W+K-1:0] pp;

  // ---------------------------------------------------------------- encoder
  always_comb begin
    y_ext = (ND*K)'(signed'(y));
    y_grp = {y_ext, 1'b0};
  end

  for (genvar k = 0; k < ND; k++) begin : g_enc
    logic [K:0]   grp;
    logic         neg;
    logic [K-1:0] mag;

    always_comb begin
      grp = y_grp[K*k +: K+1];
      neg = 1'b0;
      mag = '0;
      unique case (grp)
      3'b000, 3'b111:                begin neg = 1'b0; mag = 2'd0; end  //  0*B
      3'b001, 3'b010:                begin neg = 1'b0; mag = 2'd1; end  // +1*B
      3'b101, 3'b110:                begin neg = 1'b1; mag = 2'd1; end  // -1*B
      3'b011:                        begin neg = 1'b0; mag = 2'd2; end  // +2*B
      3'b100:                        begin neg = 1'b1; mag = 2'd2; end  // -2*B
      endcase
    end

    assign dig_neg[k] = neg;
    assign dig_mag[k] = mag;
  end

  // ------------------------------------------------------------- multiples
  always_comb begin
    bx = MW'(signed'(x));
    mult[0] = '0;
    mult[1] = bx;
    mult[2] = bx <<< 1;
  end

  // ------------------------------------------------ partial product generator
  for (genvar k = 0; k < ND; k++) begin : g_pp
    booth_pp_gen #(.W(W), .K(K)) u_pp (
      .multiples(mult), .neg(dig_neg[k]), .mag(dig_mag[k]), .pp(pp[k])
    );
  end

  // ------------------------------------------------------------------ adder
  booth_pp_adder #(.W(W), .K(K), .ND(ND)) u_add (
    .pp(pp), .p(p)
  );
endmodule
